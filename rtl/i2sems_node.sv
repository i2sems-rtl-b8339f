// i2sems_node: the security unit attached to one processor.
//
// It sits between the processor's system cache and the untrusted
// interconnect and holds the per-processor parts of the scheme: a keystream
// queue and a keystream cache for encryption, a keystream pool for
// decryption, the two message paths, and two keystream generators, each
// with its own AES pipeline, as drawn in the architecture: one fills the
// queue with the counter blocks the GCC assigns to this processor, the other
// serves decryption (the waiting message and its p-1 predicted counters)
// and precomputes broadcast counter blocks into the pool. Both derive the
// hash key H from the same secret key; the paths start once both have it.
// Fresh counters come from the Global Counter Controller: the queue requests
// a block of CR counters when it runs low, and the GCC's broadcasts of
// blocks assigned to other processors are precomputed into the pool.
// Broadcasts may arrive out of order on a general interconnect; one whose
// first counter is not above the newest broadcast already accepted is
// discarded, so an old assignment cannot be replayed into the pool.
//
// The decryption-side generator's output is routed by its destination tag:
// broadcast and predicted keystreams to the pool, and the keystream of a
// message waiting for decryption to the decryption path.
// Interface: see the ports; all handshakes are valid/ready except the GCC
// reply and broadcast, which are one-cycle pulses. `ev` gives event pulses.
// The ready outputs of the job ports a generator does not use are left open.
module i2sems_node
  import i2sems_pkg::*;
#(
  parameter int unsigned CR          = 32,
  parameter int unsigned PRED_DEPTH  = 5,
  parameter int unsigned AES_LATENCY = 80,
  parameter int unsigned AES_II      = 5,
  parameter int unsigned KC_ENTRIES  = 32,
  parameter int unsigned POOL_BYTES  = 524288,
  parameter int unsigned POOL_WAYS   = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  aes_blk_t key,
  // from the system cache
  input  logic     tx_valid,
  output logic     tx_ready,
  input  tx_req_t  tx_req,
  // to the interconnect
  output logic     net_tx_valid,
  input  logic     net_tx_ready,
  output msg_t     net_tx_msg,
  // from the interconnect
  input  logic     net_rx_valid,
  output logic     net_rx_ready,
  input  msg_t     net_rx_msg,
  // to the system cache
  output logic     rx_valid,
  output addr_t    rx_addr,
  output block_t   rx_data,
  output logic     auth_valid,
  output logic     auth_fail,
  // Global Counter Controller
  output logic     gcc_req,
  input  logic     gcc_req_ack,
  input  logic     gcc_rsp_valid,
  input  cnt_t     gcc_rsp_base,
  input  logic     gcc_bc_valid,
  input  cnt_t     gcc_bc_base,
  output node_ev_t ev
);

  aes_blk_t  h, hq;
  logic      h_valid, hp_valid, hq_valid;
  logic      g_rx_valid, g_rx_ready, g_q_valid, g_q_ready, g_bc_valid;
  cnt_t      g_rx_cnt, g_q_base;
  // decryption-side generator output
  logic      ks_valid;
  ks_dest_t  ks_dest;
  ks_entry_t ks_out;
  // queue-side generator output
  logic      kq_valid;
  ks_dest_t  kq_dest;
  ks_entry_t kq_out;

  // ---- broadcast filter ----
  cnt_t bc_max;
  logic bc_seen;
  logic bc_new;
  assign bc_new     = !bc_seen || (gcc_bc_base > bc_max);
  assign g_bc_valid = gcc_bc_valid && bc_new;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bc_max  <= '0;
      bc_seen <= 1'b0;
    end else if (g_bc_valid) begin
      bc_max  <= gcc_bc_base;
      bc_seen <= 1'b1;
    end
  end

  // Decryption side: message-driven prediction jobs and broadcast blocks.
  keystream_gen #(
    .AES_LATENCY(AES_LATENCY), .AES_II(AES_II), .CR(CR), .PRED_DEPTH(PRED_DEPTH)
  ) u_gen_pool (
    .clk(clk), .rst_n(rst_n), .key(key), .h(h), .h_valid(hp_valid),
    .rx_valid(g_rx_valid), .rx_ready(g_rx_ready), .rx_cnt(g_rx_cnt),
    .q_valid(1'b0), .q_ready(), .q_base('0),
    .bc_valid(g_bc_valid), .bc_base(gcc_bc_base),
    .ks_valid(ks_valid), .ks_dest(ks_dest), .ks_out(ks_out)
  );

  // Encryption side: this processor's own counter blocks for the queue.
  keystream_gen #(
    .AES_LATENCY(AES_LATENCY), .AES_II(AES_II), .CR(CR), .PRED_DEPTH(PRED_DEPTH)
  ) u_gen_queue (
    .clk(clk), .rst_n(rst_n), .key(key), .h(hq), .h_valid(hq_valid),
    .rx_valid(1'b0), .rx_ready(), .rx_cnt('0),
    .q_valid(g_q_valid), .q_ready(g_q_ready), .q_base(g_q_base),
    .bc_valid(1'b0), .bc_base('0),
    .ks_valid(kq_valid), .ks_dest(kq_dest), .ks_out(kq_out)
  );

  // Both generators compute the same H from the same key.
  assign h_valid = hp_valid && hq_valid;

  a_same_h: assert property (@(posedge clk) disable iff (!rst_n)
    h_valid |-> h == hq);

  // ---- encryption side ----
  logic      q_pop_valid, q_pop_ready;
  ks_entry_t q_entry;
  addr_t     kc_lk_addr, kc_ins_addr;
  logic      kc_hit, kc_ins_valid;
  ks_entry_t kc_entry, kc_ins_entry;

  keystream_queue #(.CR(CR)) u_queue (
    .clk(clk), .rst_n(rst_n),
    .gcc_req(gcc_req), .gcc_req_ack(gcc_req_ack),
    .gcc_rsp_valid(gcc_rsp_valid), .gcc_rsp_base(gcc_rsp_base),
    .gen_valid(g_q_valid), .gen_ready(g_q_ready), .gen_base(g_q_base),
    .push_valid(kq_valid && kq_dest == KD_QUEUE), .push_entry(kq_out),
    .pop_valid(q_pop_valid), .pop_ready(q_pop_ready), .pop_entry(q_entry)
  );

  keystream_cache #(.ENTRIES(KC_ENTRIES)) u_kcache (
    .clk(clk), .rst_n(rst_n),
    .lk_addr(kc_lk_addr), .lk_hit(kc_hit), .lk_entry(kc_entry),
    .ins_valid(kc_ins_valid), .ins_addr(kc_ins_addr), .ins_entry(kc_ins_entry)
  );

  logic e_kc_hit, e_q_pop, e_stall;

  msg_encrypt u_enc (
    .clk(clk), .rst_n(rst_n), .h(h), .h_valid(h_valid),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_req(tx_req),
    .kc_lk_addr(kc_lk_addr), .kc_hit(kc_hit), .kc_entry(kc_entry),
    .kc_ins_valid(kc_ins_valid), .kc_ins_addr(kc_ins_addr), .kc_ins_entry(kc_ins_entry),
    .q_pop_valid(q_pop_valid), .q_pop_ready(q_pop_ready), .q_entry(q_entry),
    .net_valid(net_tx_valid), .net_ready(net_tx_ready), .net_msg(net_tx_msg),
    .ev_kc_hit(e_kc_hit), .ev_q_pop(e_q_pop), .ev_stall(e_stall)
  );

  // ---- decryption side ----
  logic       pl_lk_valid, pl_done, pl_hit;
  cnt_t       pl_lk_cnt;
  keystream_t pl_ks;
  logic       e_pool_hit, e_pool_miss;

  keystream_pool #(.POOL_BYTES(POOL_BYTES), .WAYS(POOL_WAYS)) u_pool (
    .clk(clk), .rst_n(rst_n),
    .lk_valid(pl_lk_valid), .lk_cnt(pl_lk_cnt),
    .lk_done(pl_done), .lk_hit(pl_hit), .lk_ks(pl_ks),
    .wr_valid(ks_valid && ks_dest == KD_POOL), .wr_entry(ks_out)
  );

  msg_decrypt u_dec (
    .clk(clk), .rst_n(rst_n), .h(h), .h_valid(h_valid),
    .net_valid(net_rx_valid), .net_ready(net_rx_ready), .net_msg(net_rx_msg),
    .pl_lk_valid(pl_lk_valid), .pl_lk_cnt(pl_lk_cnt),
    .pl_done(pl_done), .pl_hit(pl_hit), .pl_ks(pl_ks),
    .gen_valid(g_rx_valid), .gen_ready(g_rx_ready), .gen_cnt(g_rx_cnt),
    .ks_valid(ks_valid), .ks_dest(ks_dest), .ks_in(ks_out),
    .rx_valid(rx_valid), .rx_addr(rx_addr), .rx_data(rx_data),
    .auth_valid(auth_valid), .auth_fail(auth_fail),
    .ev_pool_hit(e_pool_hit), .ev_pool_miss(e_pool_miss)
  );

  assign ev = '{
    gcc_req:    gcc_req && gcc_req_ack,
    q_pop:      e_q_pop,
    q_stall:    e_stall,
    kc_hit:     e_kc_hit,
    pool_hit:   e_pool_hit,
    pool_miss:  e_pool_miss,
    bc_accept:  g_bc_valid,
    bc_discard: gcc_bc_valid && !bc_new,
    auth_fail:  auth_valid && auth_fail
  };

endmodule
