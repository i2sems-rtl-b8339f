// tb_keystream_cache: directed checks of the keystream cache: misses when
// empty, hits with the right counter and keystream after insertion, offset
// bits ignored, overwrite in place when a block is re-encrypted with a new
// counter, and eviction of the oldest entry once all 32 are in use.
module tb_keystream_cache;
  import i2sems_pkg::*;
  localparam int N = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  addr_t lk_addr, ins_addr;
  logic lk_hit, ins_valid;
  ks_entry_t lk_entry, ins_entry;
  int checks = 0, failures = 0;

  keystream_cache #(.ENTRIES(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic ks_entry_t ent(input int c);
    return '{cnt: cnt_t'(c), ks: {3{32'(c * 77 + 1), 96'(c)}}};
  endfunction
  function automatic addr_t ad(input int i);
    return addr_t'(32'h0100_0000 + i * 32);
  endfunction

  task automatic ins(input addr_t a, input int c);
    @(negedge clk);
    ins_valid = 1; ins_addr = a; ins_entry = ent(c);
    @(negedge clk);
    ins_valid = 0;
  endtask
  task automatic look(input addr_t a, input bit hit, input int c, input string what);
    @(negedge clk); lk_addr = a; @(posedge clk);
    check(lk_hit == hit, $sformatf("%s hit/miss %h", what, a));
    if (hit) check(lk_entry == ent(c), {what, " entry"});
  endtask

  initial begin
    ins_valid = 0; ins_addr = '0; ins_entry = '0; lk_addr = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    look(ad(0), 0, 0, "empty");
    for (int i = 0; i < N; i++) ins(ad(i), 100 + i);
    @(negedge clk);
    for (int i = 0; i < N; i++) look(ad(i), 1, 100 + i, $sformatf("filled %0d", i));
    look(ad(0) + 7, 1, 100, "offset ignored");
    look(ad(N), 0, 0, "unknown block");
    @(posedge clk);
    ins(ad(5), 999);                     // block 5 re-encrypted with a new counter
    @(negedge clk);
    look(ad(5), 1, 999, "overwrite");
    look(ad(0), 1, 100, "no eviction on overwrite");
    @(posedge clk);
    ins(ad(N), 500);                     // full: evicts the oldest (block 0)
    ins(ad(N + 1), 501);                 // then block 1
    @(negedge clk);
    look(ad(0), 0, 0, "oldest evicted");
    look(ad(1), 0, 0, "second oldest evicted");
    look(ad(N), 1, 500, "new block");
    look(ad(N + 1), 1, 501, "new block 2");
    look(ad(2), 1, 102, "others kept");
    look(ad(5), 1, 999, "overwritten kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
