// i2sems_top: the security fabric of a shared-memory multiprocessor.
//
// N_PROC processor security units (i2sems_node) and one Global Counter
// Controller (gcc). Each unit encrypts every data block its processor sends
// with AES in counter mode and authenticates it with a GCM tag; the counter
// travels with the message, so the scheme works on any interconnect, in any
// order of delivery, and with any coherence protocol that keeps cache-block
// states right. Counters are unique system-wide because only the GCC hands
// them out, in blocks of CR, to whichever unit runs low; it also broadcasts
// every assignment so the other units can precompute those keystreams and
// decrypt arriving messages without waiting for AES.
//
// The interconnect, the system caches and the memory are outside this
// module: per processor, tx_* takes a block to send (with its cache state)
// and rx_* returns decrypted blocks, while net_tx_* and net_rx_* are the
// encrypted messages to and from the interconnect. The GCC is wired to the
// units directly (its counter requests and replies would cross the same
// interconnect in a real system). Per-unit event pulses come out on `ev`.
module i2sems_top
  import i2sems_pkg::*;
#(
  parameter int unsigned N_PROC      = 16,
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
  input  logic     tx_valid     [N_PROC],
  output logic     tx_ready     [N_PROC],
  input  tx_req_t  tx_req       [N_PROC],
  output logic     net_tx_valid [N_PROC],
  input  logic     net_tx_ready [N_PROC],
  output msg_t     net_tx_msg   [N_PROC],
  input  logic     net_rx_valid [N_PROC],
  output logic     net_rx_ready [N_PROC],
  input  msg_t     net_rx_msg   [N_PROC],
  output logic     rx_valid     [N_PROC],
  output addr_t    rx_addr      [N_PROC],
  output block_t   rx_data      [N_PROC],
  output logic     auth_valid   [N_PROC],
  output logic     auth_fail    [N_PROC],
  output node_ev_t ev           [N_PROC]
);

  logic [N_PROC-1:0] req, req_ack, rsp_valid, bc_valid;
  cnt_t rsp_base, bc_base;

  gcc #(.N_PROC(N_PROC), .CR(CR)) u_gcc (
    .clk(clk), .rst_n(rst_n), .req(req), .req_ack(req_ack),
    .rsp_valid(rsp_valid), .rsp_base(rsp_base),
    .bc_valid(bc_valid), .bc_base(bc_base)
  );

  for (genvar i = 0; i < N_PROC; i++) begin : g_node
    i2sems_node #(
      .CR(CR), .PRED_DEPTH(PRED_DEPTH), .AES_LATENCY(AES_LATENCY), .AES_II(AES_II),
      .KC_ENTRIES(KC_ENTRIES), .POOL_BYTES(POOL_BYTES), .POOL_WAYS(POOL_WAYS)
    ) u_node (
      .clk(clk), .rst_n(rst_n), .key(key),
      .tx_valid(tx_valid[i]), .tx_ready(tx_ready[i]), .tx_req(tx_req[i]),
      .net_tx_valid(net_tx_valid[i]), .net_tx_ready(net_tx_ready[i]), .net_tx_msg(net_tx_msg[i]),
      .net_rx_valid(net_rx_valid[i]), .net_rx_ready(net_rx_ready[i]), .net_rx_msg(net_rx_msg[i]),
      .rx_valid(rx_valid[i]), .rx_addr(rx_addr[i]), .rx_data(rx_data[i]),
      .auth_valid(auth_valid[i]), .auth_fail(auth_fail[i]),
      .gcc_req(req[i]), .gcc_req_ack(req_ack[i]),
      .gcc_rsp_valid(rsp_valid[i]), .gcc_rsp_base(rsp_base),
      .gcc_bc_valid(bc_valid[i]), .gcc_bc_base(bc_base),
      .ev(ev[i])
    );
  end

endmodule
