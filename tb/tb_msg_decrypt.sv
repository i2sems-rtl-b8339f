// tb_msg_decrypt: sends messages encrypted by the testbench into the
// decryption path, with the keystream pool and generator played by the
// testbench. Checks: a prediction job for the message counter is issued on
// arrival either way; on a pool hit the plaintext comes out two cycles after
// arrival; on a miss the path ignores a generator result for another counter
// and waits for its own; the tag check passes for genuine messages and
// raises auth_fail six cycles after the plaintext for a tampered one.
module tb_msg_decrypt;
  import i2sems_pkg::*;
  import gf128_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  aes_blk_t h;
  logic h_valid, net_valid, net_ready, pl_lk_valid, pl_done, pl_hit, gen_valid, gen_ready;
  logic ks_valid, rx_valid, auth_valid, auth_fail, ev_pool_hit, ev_pool_miss;
  msg_t net_msg;
  cnt_t pl_lk_cnt, gen_cnt;
  keystream_t pl_ks;
  ks_dest_t ks_dest;
  ks_entry_t ks_in;
  addr_t rx_addr;
  block_t rx_data;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  msg_decrypt dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic keystream_t ks_of(input cnt_t c);
    return {c * 64'h9E3779B97F4A7C15, ~c, c ^ 64'h1234, c + 64'd99, c << 3, c * 3};
  endfunction
  function automatic block_t rblk();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  // pool model: counters below 1000 are present
  always @(posedge clk) begin
    pl_done <= rst_n && pl_lk_valid;
    pl_hit  <= pl_lk_cnt < 1000;
    pl_ks   <= ks_of(pl_lk_cnt);
  end
  int jobs = 0;
  cnt_t last_job;
  always @(posedge clk) if (rst_n && gen_valid && gen_ready) begin jobs++; last_job = gen_cnt; end

  int t_arr, t_rx, t_auth;
  bit got_fail;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) t_rx = cyc;
    if (auth_valid) begin t_auth = cyc; got_fail = auth_fail; end
  end

  task automatic deliver(input cnt_t c, input bit tamper, input bit hit, input string what);
    block_t p, ct;
    addr_t a;
    msg_t m;
    int j0;
    p = rblk(); a = addr_t'($urandom) & ~addr_t'(31);
    ct = p ^ {ks_of(c).pad2, ks_of(c).pad1};
    m = '{dest: 8'd1, addr: a, data: ct,
          tag: tag(h, 128'(a), ct[127:0], ct[255:128], ks_of(c).mac_pad), cnt: c};
    if (tamper) m.data[77] = ~m.data[77];
    j0 = jobs;
    t_rx = 0; t_auth = 0;
    @(negedge clk);
    net_valid = 1; net_msg = m;
    do @(posedge clk); while (!net_ready);
    t_arr = cyc;
    @(negedge clk); net_valid = 0;
    check(jobs == j0 + 1 && last_job == c, {what, ": prediction job issued"});
    if (!hit) begin
      // a stale result for another counter first, then the right one
      repeat (20) @(negedge clk);
      check(t_rx == 0, {what, ": waits on a miss"});
      ks_valid = 1; ks_dest = KD_RX; ks_in = '{cnt: c + 7, ks: ks_of(c + 7)};
      @(negedge clk);
      ks_dest = KD_POOL; ks_in = '{cnt: c + 1, ks: ks_of(c + 1)};
      @(negedge clk);
      ks_dest = KD_RX; ks_in = '{cnt: c, ks: ks_of(c)};
      @(negedge clk);
      ks_valid = 0;
    end
    repeat (12) @(negedge clk);
    check(t_rx != 0, {what, ": plaintext delivered"});
    if (hit) check(t_rx - t_arr == 2, $sformatf("%s: hit latency %0d", what, t_rx - t_arr));
    if (!tamper) check(rx_data == p && rx_addr == a, {what, ": plaintext"});
    check(t_auth - t_rx == 6, {what, ": lazy authentication six cycles later"});
    check(got_fail == tamper, {what, ": authentication result"});
  endtask

  int hits = 0, misses = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_pool_hit) hits++;
    if (ev_pool_miss) misses++;
  end

  initial begin
    h = {$urandom, $urandom, $urandom, $urandom};
    h_valid = 1; net_valid = 0; net_msg = '0; gen_ready = 1;
    ks_valid = 0; ks_dest = KD_POOL; ks_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    deliver(64'd10, 0, 1, "pool hit");
    deliver(64'd5000, 0, 0, "pool miss");
    deliver(64'd20, 1, 1, "tampered, hit");
    deliver(64'd6000, 1, 0, "tampered, miss");
    check(hits == 2 && misses == 2, "hit/miss events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
