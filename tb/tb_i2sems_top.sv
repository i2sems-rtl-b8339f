// tb_i2sems_top: end-to-end run of the whole fabric at its default sizes
// (16 processors, CR = 32, p = 5, 32-entry keystream caches, 512 KB 4-way
// keystream pools, 80-cycle AES). The testbench plays the system caches and
// the interconnect: every processor sends NMSG blocks from a small working
// set to random other processors, in Modified, Exclusive or Owned state;
// the interconnect delays each message at random, delivers out of order,
// and corrupts a few. Every delivered block must decrypt to what was sent,
// every corrupted one must raise auth_fail and no genuine one may, and a
// counter may appear twice only for the same sender and block (keystream
// cache reuse). Each mechanism must occur at least once: counter requests,
// fresh-counter encryption, stalls on an empty keystream queue, keystream
// cache reuse, pool hits and misses, broadcast precomputation, detected
// tampering and out-of-order delivery. (Stale-broadcast discarding cannot
// occur here because the GCC is wired directly to the units; the unit's own
// testbench covers it.)
module tb_i2sems_top;
  import i2sems_pkg::*;
  localparam int N = 16;
  localparam int NMSG = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  aes_blk_t key;
  logic     tx_valid [N], tx_ready [N], net_tx_valid [N], net_tx_ready [N];
  logic     net_rx_valid [N], net_rx_ready [N], rx_valid [N], auth_valid [N], auth_fail [N];
  tx_req_t  tx_req [N];
  msg_t     net_tx_msg [N], net_rx_msg [N];
  addr_t    rx_addr [N];
  block_t   rx_data [N];
  node_ev_t ev [N];
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  i2sems_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic block_t rblk();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  // ---- event counting ----
  int n_req, n_pop, n_stall, n_kc, n_hit, n_miss, n_bca, n_bcd, n_af, n_ooo;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      n_req += ev[i].gcc_req; n_pop += ev[i].q_pop; n_stall += ev[i].q_stall;
      n_kc += ev[i].kc_hit; n_hit += ev[i].pool_hit; n_miss += ev[i].pool_miss;
      n_bca += ev[i].bc_accept; n_bcd += ev[i].bc_discard; n_af += ev[i].auth_fail;
    end
  end

  // ---- interconnect model ----
  typedef struct {
    msg_t   m;
    block_t plain;
    bit     bad;
    int     due;
    int     seq;
    int     src;
  } flight_t;
  flight_t inflight [N][$];        // per destination
  flight_t expect_q [N][$];        // accepted by the destination, awaiting output
  int      last_seq [N];
  int      sent_total = 0, done_total = 0, seq_no = 0;
  int      cnt_owner_src [cnt_t];
  addr_t   cnt_owner_addr [cnt_t];
  block_t  plain_of [N][addr_t];   // current contents of each sender's blocks
  block_t  sent_plain [N][$];      // plaintexts accepted for encryption, in order

  // take messages from the senders
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < N; s++) begin
      if (net_tx_valid[s] && net_tx_ready[s]) begin
        flight_t f;
        msg_t m;
        m = net_tx_msg[s];
        f.m = m; f.plain = sent_plain[s].pop_front(); f.src = s;
        f.bad = ($urandom_range(0, 19) == 0);
        if (f.bad) begin
          int b;
          b = $urandom_range(0, 255);
          f.m.data[b] = ~f.m.data[b];
        end
        f.due = cyc + $urandom_range(10, 120);
        f.seq = seq_no++;
        if (cnt_owner_src.exists(m.cnt))
          check(cnt_owner_src[m.cnt] == s && cnt_owner_addr[m.cnt] == m.addr,
                $sformatf("counter %0d reused only for the same block", m.cnt));
        cnt_owner_src[m.cnt] = s; cnt_owner_addr[m.cnt] = m.addr;
        inflight[int'(m.dest)].push_back(f);
      end
    end
  end
  always_comb for (int s = 0; s < N; s++) net_tx_ready[s] = 1'b1;

  // deliver, choosing at random among the messages that are due
  initial begin
    for (int d = 0; d < N; d++) begin net_rx_valid[d] = 0; net_rx_msg[d] = '0; last_seq[d] = -1; end
    wait (rst_n);
    forever begin
      @(negedge clk);
      for (int d = 0; d < N; d++) begin
        if (net_rx_valid[d] && net_rx_ready_q[d]) net_rx_valid[d] = 0;
        if (!net_rx_valid[d]) begin
          int pick [$];
          pick.delete();
          foreach (inflight[d][k]) if (inflight[d][k].due <= cyc) pick.push_back(k);
          if (pick.size() > 0) begin
            int k;
            k = pick[$urandom_range(0, pick.size() - 1)];
            if (inflight[d][k].seq < last_seq[d]) n_ooo++;
            last_seq[d] = inflight[d][k].seq;
            net_rx_valid[d] = 1;
            net_rx_msg[d] = inflight[d][k].m;
            expect_q[d].push_back(inflight[d][k]);
            inflight[d].delete(k);
          end
        end
      end
    end
  end
  logic net_rx_ready_q [N];
  always @(posedge clk) for (int d = 0; d < N; d++) net_rx_ready_q[d] <= net_rx_valid[d] && net_rx_ready[d];

  // check what the receivers hand back
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < N; d++) begin
      if (rx_valid[d]) begin
        check(expect_q[d].size() > 0, "plaintext for a delivered message");
        if (expect_q[d].size() > 0 && !expect_q[d][0].bad)
          check(rx_data[d] == expect_q[d][0].plain && rx_addr[d] == expect_q[d][0].m.addr,
                $sformatf("plaintext at %0d from %0d cnt=%0d seq=%0d got=%h exp=%h", d, expect_q[d][0].src, expect_q[d][0].m.cnt, expect_q[d][0].seq, rx_data[d][31:0], expect_q[d][0].plain[31:0]));
      end
      if (auth_valid[d]) begin
        check(expect_q[d].size() > 0, "authentication for a delivered message");
        if (expect_q[d].size() > 0) begin
          check(auth_fail[d] == expect_q[d][0].bad, $sformatf("authentication result at %0d", d));
          void'(expect_q[d].pop_front());
          done_total++;
        end
      end
    end
  end

  // ---- the processors' system caches ----
  task automatic processor(input int s);
    addr_t ws [6];
    bit    dirty_sent [6];
    for (int k = 0; k < 6; k++) begin
      ws[k] = addr_t'(32'h0100_0000 + s * 32'h1000 + k * 32);
      dirty_sent[k] = 0;
    end
    for (int n = 0; n < NMSG; n++) begin
      int k, r, d;
      cstate_t st;
      block_t data;
      k = $urandom_range(0, 5);
      r = $urandom_range(0, 9);
      // a block already sent once and not written since may go out as Owned
      if (dirty_sent[k] && r < 5) st = ST_O;
      else begin
        st = (r < 8) ? ST_M : ST_E;
        plain_of[s][ws[k]] = rblk();
        dirty_sent[k] = 1;
      end
      data = plain_of[s][ws[k]];
      d = (s + $urandom_range(1, N - 1)) % N;
      @(negedge clk);
      tx_valid[s] = 1;
      tx_req[s] = '{dest: DEST_W'(d), addr: ws[k], data: data, state: st};
      do @(posedge clk); while (!tx_ready[s]);
      sent_plain[s].push_back(data);
      @(negedge clk);
      tx_valid[s] = 0;
      sent_total++;
      repeat ($urandom_range(0, 40)) @(negedge clk);
    end
  endtask

  initial begin
    key = 128'h000102030405060708090a0b0c0d0e0f;
    for (int s = 0; s < N; s++) begin tx_valid[s] = 0; tx_req[s] = '0; end
    n_req = 0; n_pop = 0; n_stall = 0; n_kc = 0; n_hit = 0; n_miss = 0;
    n_bca = 0; n_bcd = 0; n_af = 0; n_ooo = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < N; s++) begin
      automatic int ss = s;
      fork processor(ss); join_none
    end
    wait (sent_total == N * NMSG);
    wait (done_total == N * NMSG);
    repeat (20) @(posedge clk);
    $display("cycles=%0d messages=%0d requests=%0d fresh=%0d stalls=%0d reuse=%0d pool_hit=%0d pool_miss=%0d bc=%0d bc_discard=%0d auth_fail=%0d out_of_order=%0d",
             cyc, done_total, n_req, n_pop, n_stall, n_kc, n_hit, n_miss, n_bca, n_bcd, n_af, n_ooo);
    check(n_req > 0,   "counter requests to the GCC happened");
    check(n_pop > 0,   "fresh-counter encryptions happened");
    check(n_stall > 0, "stalls on an empty keystream queue happened");
    check(n_kc > 0,    "keystream cache reuse happened");
    check(n_hit > 0,   "keystream pool hits happened");
    check(n_miss > 0,  "keystream pool misses happened");
    check(n_bca > 0,   "broadcast precomputation happened");
    check(n_af > 0,    "tampering detected");
    check(n_ooo > 0,   "out-of-order delivery happened");
    check(n_hit + n_miss == N * NMSG, "every message looked up in the pool");
    check(n_pop + n_kc == N * NMSG, "every block encrypted from queue or cache");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
