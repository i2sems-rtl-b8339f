// tb_keystream_pool: checks the keystream pool at the full 512 KB, 4-way
// size and at two of the smaller configurations evaluated for the scheme,
// 64 KB direct-mapped and 128 KB 2-way. All three pools see the same writes;
// the test for each configuration writes runs of counters and reads them
// back one cycle after the lookup, checks misses on counters never written,
// and fills one set with WAYS+1 counters that share its index to check that
// the oldest way is replaced while the neighbouring set is untouched.
module tb_keystream_pool;
  import i2sems_pkg::*;
  localparam int NCFG = 3;
  localparam int BYTES [NCFG] = '{524288, 65536, 131072};
  localparam int WAYS  [NCFG] = '{4, 1, 2};
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic lk_valid, wr_valid;
  cnt_t lk_cnt;
  ks_entry_t wr_entry;
  logic       done_a [NCFG], hit_a [NCFG];
  keystream_t ks_a   [NCFG];
  int checks = 0, failures = 0;

  // the default configuration, instantiated with no parameter list
  keystream_pool dut (
    .clk(clk), .rst_n(rst_n), .lk_valid(lk_valid), .lk_cnt(lk_cnt),
    .lk_done(done_a[0]), .lk_hit(hit_a[0]), .lk_ks(ks_a[0]),
    .wr_valid(wr_valid), .wr_entry(wr_entry)
  );
  for (genvar g = 1; g < NCFG; g++) begin : g_small
    keystream_pool #(.POOL_BYTES(BYTES[g]), .WAYS(WAYS[g])) u_pool (
      .clk(clk), .rst_n(rst_n), .lk_valid(lk_valid), .lk_cnt(lk_cnt),
      .lk_done(done_a[g]), .lk_hit(hit_a[g]), .lk_ks(ks_a[g]),
      .wr_valid(wr_valid), .wr_entry(wr_entry)
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic keystream_t ks_of(input cnt_t c);
    return {c ^ 64'hA5A5, c, ~c, c * 5, c + 3, c << 2};
  endfunction
  task automatic wr(input cnt_t c);
    @(negedge clk); wr_valid = 1; wr_entry = '{cnt: c, ks: ks_of(c)};
    @(negedge clk); wr_valid = 0;
  endtask
  task automatic lk(input int cfg, input cnt_t c, input bit hit, input string what);
    string tag;
    tag = $sformatf("[%0d KB %0d-way] %s", BYTES[cfg] / 1024, WAYS[cfg], what);
    @(negedge clk); lk_valid = 1; lk_cnt = c;
    @(negedge clk); lk_valid = 0;
    check(done_a[cfg], {tag, " done after one cycle"});
    check(hit_a[cfg] == hit, $sformatf("%s hit=%0d for %0d", tag, hit_a[cfg], c));
    if (hit) check(ks_a[cfg] == ks_of(c), {tag, " keystream"});
  endtask

  initial begin
    int sets;
    cnt_t base;
    lk_valid = 0; lk_cnt = '0; wr_valid = 0; wr_entry = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int cfg = 0; cfg < NCFG; cfg++) begin
      sets = BYTES[cfg] / 32 / WAYS[cfg];
      base = cnt_t'(100000 * (cfg + 1));
      lk(cfg, 64'd7, 0, "empty");
      for (int i = 1; i <= 40; i++) wr(base + cnt_t'(i));
      for (int i = 1; i <= 40; i++) lk(cfg, base + cnt_t'(i), 1, "stored");
      lk(cfg, base, 0, "never written");
      lk(cfg, base + 41, 0, "never written 2");
      lk(cfg, base + 1 + cnt_t'(64 * sets), 0, "same set, other tag");
      // WAYS more counters in the set of base+1: base+1 itself is replaced
      for (int k = 1; k <= WAYS[cfg]; k++) wr(base + 1 + cnt_t'(k * sets));
      lk(cfg, base + 1, 0, "oldest way replaced");
      for (int k = 1; k <= WAYS[cfg]; k++)
        lk(cfg, base + 1 + cnt_t'(k * sets), 1, "newer ways kept");
      lk(cfg, base + 2, 1, "neighbour set untouched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
