// tb_msg_encrypt: drives blocks in the Modified, Exclusive, Owned and
// Shared states through the encryption path, with the keystream queue and
// keystream cache played by the testbench. Checks: which keystream source is
// used (cache only for an Owned block that hits), ciphertext = data XOR pads,
// tag against the reference GCM computation, the counter carried, insertion
// of fresh counters into the cache, a stall while the queue is empty, and
// the seven-cycle path from keystream selection to the message.
module tb_msg_encrypt;
  import i2sems_pkg::*;
  import gf128_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  aes_blk_t h;
  logic h_valid, tx_valid, tx_ready, kc_hit, kc_ins_valid, q_pop_valid, q_pop_ready;
  logic net_valid, net_ready, ev_kc_hit, ev_q_pop, ev_stall;
  tx_req_t tx_req;
  addr_t kc_lk_addr, kc_ins_addr;
  ks_entry_t kc_entry, kc_ins_entry, q_entry;
  msg_t net_msg;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  msg_encrypt dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic keystream_t ks_of(input cnt_t c);
    return {c * 64'h9E3779B97F4A7C15, ~c, c ^ 64'h1234, c + 64'd99, c << 3, c * 3};
  endfunction

  // keystream cache model
  ks_entry_t kc [addr_t];
  always_comb begin
    kc_hit = kc.exists(kc_lk_addr);
    kc_entry = kc_hit ? kc[kc_lk_addr] : '0;
  end
  int inserts = 0;
  always @(posedge clk) if (rst_n && kc_ins_valid) begin
    kc[kc_ins_addr] = kc_ins_entry;
    inserts++;
  end

  // keystream queue model: counters 500, 501, ...; can be switched off
  cnt_t q_next = 64'd500;
  bit   q_on = 1;
  assign q_pop_valid = q_on;
  assign q_entry = '{cnt: q_next, ks: ks_of(q_next)};
  int pops = 0, stalls = 0, kc_hits = 0, sel_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    if (q_pop_valid && q_pop_ready) begin q_next <= q_next + 1; pops++; sel_cyc = cyc; end
    if (ev_kc_hit) begin kc_hits++; sel_cyc = cyc; end
    if (ev_stall) stalls++;
  end

  task automatic send(input cstate_t s, input addr_t a, input block_t d,
                      input bit exp_cache, input string what);
    ks_entry_t e;
    int p0;
    p0 = pops;
    e = exp_cache ? kc[a] : '{cnt: q_next, ks: ks_of(q_next)};
    @(negedge clk);
    tx_valid = 1; tx_req = '{dest: 8'd3, addr: a, data: d, state: s};
    do @(posedge clk); while (!tx_ready);
    @(negedge clk); tx_valid = 0;
    while (!net_valid) @(negedge clk);
    if (!exp_cache && q_on) e = '{cnt: q_next - 1, ks: ks_of(q_next - 1)};
    check(net_msg.cnt == e.cnt, {what, ": counter"});
    check(net_msg.data == (d ^ {e.ks.pad2, e.ks.pad1}), {what, ": ciphertext"});
    check(net_msg.tag == tag(h, 128'(a), net_msg.data[127:0], net_msg.data[255:128], e.ks.mac_pad),
          {what, ": tag"});
    check(net_msg.addr == a && net_msg.dest == 8'd3, {what, ": header"});
    check(pops - p0 == (exp_cache ? 0 : 1), {what, ": keystream source"});
    check(cyc - sel_cyc == 7, $sformatf("%s: selection to message %0d cycles", what, cyc - sel_cyc));
    net_ready = 1;
    @(negedge clk); net_ready = 0;
  endtask

  function automatic block_t rblk();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    h = {$urandom, $urandom, $urandom, $urandom};
    h_valid = 1; tx_valid = 0; tx_req = '0; net_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    send(ST_M, 31'h1000, rblk(), 0, "modified");
    check(kc.exists(31'h1000) && kc[31'h1000].cnt == 64'd500, "fresh counter cached");
    send(ST_O, 31'h1000, rblk(), 1, "owned, cached");
    send(ST_O, 31'h2000, rblk(), 0, "owned, not cached");
    send(ST_E, 31'h2000, rblk(), 0, "exclusive uses fresh counter");
    check(kc[31'h2000].cnt == 64'd502, "cache entry replaced by the new counter");
    send(ST_S, 31'h2000, rblk(), 0, "shared uses fresh counter");
    // empty queue: the path must stall, then go on
    q_on = 0;
    fork
      send(ST_M, 31'h3000, rblk(), 0, "after stall");
      begin repeat (30) @(posedge clk); q_on = 1; end
    join
    check(stalls >= 25, $sformatf("stalled while queue empty (%0d)", stalls));
    check(kc_hits == 1 && inserts == 5, "cache use and inserts");
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
