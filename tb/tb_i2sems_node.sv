// tb_i2sems_node: one processor's security unit at its default sizes, with
// the testbench acting as the GCC and as the interconnect (messages are
// looped back to the same unit). Keystreams are checked against the
// reference AES. Covers: the first encryption stalling until the first
// fresh keystream is ready, a pool miss then a pool hit through prediction,
// reuse of a cached counter for an Owned block, precomputation of a
// broadcast block (pool hit on a message from "another processor"), a stale
// broadcast being discarded, a tampered message raising auth_fail, and a
// burst of sends that needs several counter refills, with every counter
// coming from the blocks the GCC handed out.
module tb_i2sems_node;
  import i2sems_pkg::*;
  import gf128_ref_pkg::*;
  import aes_ref_pkg::*;
  localparam int CR = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  aes_blk_t key;
  logic tx_valid, tx_ready, net_tx_valid, net_tx_ready, net_rx_valid, net_rx_ready;
  logic rx_valid, auth_valid, auth_fail, gcc_req, gcc_req_ack, gcc_rsp_valid, gcc_bc_valid;
  tx_req_t tx_req;
  msg_t net_tx_msg, net_rx_msg;
  addr_t rx_addr;
  block_t rx_data;
  cnt_t gcc_rsp_base, gcc_bc_base;
  node_ev_t ev;
  int checks = 0, failures = 0;

  i2sems_node dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic block_t rblk();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  // event counters
  int n_req, n_pop, n_stall, n_kc, n_hit, n_miss, n_bca, n_bcd, n_af;
  always @(posedge clk) if (rst_n) begin
    n_req += ev.gcc_req; n_pop += ev.q_pop; n_stall += ev.q_stall; n_kc += ev.kc_hit;
    n_hit += ev.pool_hit; n_miss += ev.pool_miss; n_bca += ev.bc_accept;
    n_bcd += ev.bc_discard; n_af += ev.auth_fail;
  end

  // GCC model: blocks of CR counters from 1 upwards
  cnt_t gcc_next = 64'd1;
  initial begin
    gcc_req_ack = 0; gcc_rsp_valid = 0; gcc_rsp_base = '0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (gcc_req) begin
        gcc_req_ack = 1;
        @(negedge clk); gcc_req_ack = 0;
        repeat (10) @(negedge clk);
        gcc_rsp_valid = 1; gcc_rsp_base = gcc_next; gcc_next += CR;
        @(negedge clk); gcc_rsp_valid = 0;
      end
    end
  end

  task automatic broadcast(input cnt_t base);
    @(negedge clk); gcc_bc_valid = 1; gcc_bc_base = base;
    @(negedge clk); gcc_bc_valid = 0;
  endtask

  // send one block from the "system cache"; return the message
  task automatic send(input cstate_t s, input addr_t a, input block_t d, output msg_t m);
    @(negedge clk); tx_valid = 1; tx_req = '{dest: 8'd0, addr: a, data: d, state: s};
    do @(posedge clk); while (!tx_ready);
    @(negedge clk); tx_valid = 0;
    while (!net_tx_valid) @(negedge clk);
    m = net_tx_msg;
    net_tx_ready = 1; @(negedge clk); net_tx_ready = 0;
    begin
      keystream_t k;
      k = keystream(key, m.cnt);
      check(m.data == (d ^ {k.pad2, k.pad1}), "ciphertext under the reference keystream");
      check(m.tag == tag(aes(key, '0), 128'(a), m.data[127:0], m.data[255:128], k.mac_pad), "tag");
    end
  endtask

  // deliver a message and wait for plaintext and authentication
  task automatic deliver(input msg_t m, input block_t exp, input bit exp_fail, input string what);
    bit got_rx;
    got_rx = 0;
    @(negedge clk); net_rx_valid = 1; net_rx_msg = m;
    do @(posedge clk); while (!net_rx_ready);
    @(negedge clk); net_rx_valid = 0;
    while (!auth_valid) begin
      if (rx_valid) begin
        got_rx = 1;
        if (!exp_fail) check(rx_data == exp && rx_addr == m.addr, {what, ": plaintext"});
      end
      @(negedge clk);
    end
    check(got_rx, {what, ": plaintext delivered"});
    check(auth_fail == exp_fail, {what, ": authentication"});
  endtask

  function automatic msg_t craft(input cnt_t c, input addr_t a, input block_t p);
    keystream_t k;
    block_t ct;
    k = keystream(key, c);
    ct = p ^ {k.pad2, k.pad1};
    return '{dest: 8'd0, addr: a, data: ct,
             tag: tag(aes(key, '0), 128'(a), ct[127:0], ct[255:128], k.mac_pad), cnt: c};
  endfunction

  initial begin
    msg_t m1, m2, m3, mx;
    block_t d1, d2, d3;
    int h0, m0;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    tx_valid = 0; tx_req = '0; net_tx_ready = 0; net_rx_valid = 0; net_rx_msg = '0;
    gcc_bc_valid = 0; gcc_bc_base = '0;
    n_req = 0; n_pop = 0; n_stall = 0; n_kc = 0; n_hit = 0; n_miss = 0; n_bca = 0; n_bcd = 0; n_af = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    d1 = rblk(); d2 = rblk();
    send(ST_M, 31'h0000_1000, d1, m1);
    check(m1.cnt == 64'd1, "first counter from the GCC");
    check(n_stall > 0, $sformatf("first send stalled until the first keystream (%0d)", n_stall));
    deliver(m1, d1, 0, "own message, counter 1");
    check(n_miss == 1, "pool miss on an unpredicted counter");
    send(ST_M, 31'h0000_2000, d2, m2);
    check(m2.cnt == 64'd2, "next counter");
    repeat (200) @(negedge clk);
    deliver(m2, d2, 0, "counter 2");
    check(n_hit == 1, "pool hit on a predicted counter");
    d3 = rblk();
    send(ST_O, 31'h0000_1000, d3, m3);
    check(m3.cnt == 64'd1 && n_kc == 1, "Owned block reuses its cached counter");
    // broadcast of another processor's block, then a message from it
    broadcast(64'd20001);
    repeat (1300) @(negedge clk);
    d1 = rblk();
    h0 = n_hit;
    deliver(craft(64'd20005, 31'h0000_4000, d1), d1, 0, "broadcast counter");
    check(n_hit == h0 + 1, "pool hit on a broadcast counter");
    // an older broadcast arriving late is discarded
    broadcast(64'd10001);
    check(n_bca == 1 && n_bcd == 1, "stale broadcast discarded");
    repeat (700) @(negedge clk);
    m0 = n_miss;
    d1 = rblk();
    deliver(craft(64'd10003, 31'h0000_5000, d1), d1, 0, "counter of discarded broadcast");
    check(n_miss == m0 + 1, "discarded broadcast not precomputed");
    // tampering
    mx = craft(64'd20010, 31'h0000_6000, d1);
    mx.tag[3] = ~mx.tag[3];
    deliver(mx, d1, 1, "forged tag");
    @(negedge clk);
    check(n_af == 1, "authentication failure event");
    // burst of fresh-counter sends needing several refills
    begin
      cnt_t seen [cnt_t];
      for (int i = 0; i < 100; i++) begin
        send(ST_M, addr_t'(32'h10000 + 32 * i), rblk(), mx);
        check(!seen.exists(mx.cnt) && mx.cnt >= 3 && mx.cnt < gcc_next, "fresh unique counter");
        seen[mx.cnt] = 1;
      end
    end
    check(n_req >= 4, $sformatf("several refills requested (%0d)", n_req));
    check(n_pop == 102, "fresh counters popped");
    $display("events: req=%0d pop=%0d stall=%0d kc=%0d hit=%0d miss=%0d bca=%0d bcd=%0d af=%0d",
             n_req, n_pop, n_stall, n_kc, n_hit, n_miss, n_bca, n_bcd, n_af);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
