// msg_encrypt: encryption path for blocks leaving a processor.
//
// The state of the block in the system cache selects the keystream. A block
// in the Owned state has not changed since this processor last encrypted it,
// so the counter and keystream kept for its address in the keystream cache
// are used again; if the cache has none, or the block is in any other state
// (Modified or Exclusive per the design; Shared and Invalid are treated the
// same way here, the safe choice), the next fresh {counter, keystream} is
// popped from the keystream queue and also written to the keystream cache.
// If the queue is empty the path stalls until a refill arrives. The data is
// XORed with the two 128-bit pads (low half with pad1, high half with pad2)
// and the GCM tag is computed over address and ciphertext (gcm_tag, six
// cycles). The message carries its counter in clear.
//
// One block is handled at a time: tx accepted (cycle 0), keystream chosen
// (cycle 1, or later while stalled), tag ready six cycles after that, then
// the message is offered on net_valid/net_ready.
// Interface: tx_valid/tx_ready/tx_req in; kc_* to the keystream cache;
// q_pop_* to the keystream queue; net_valid/net_ready/net_msg out; one-cycle
// event pulses ev_kc_hit, ev_q_pop, ev_stall.
// The keystream-cache write port carries the popped queue entry and the
// request address unchanged (combinational pass-through).
module msg_encrypt
  import i2sems_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  aes_blk_t  h,
  input  logic      h_valid,
  input  logic      tx_valid,
  output logic      tx_ready,
  input  tx_req_t   tx_req,
  output addr_t     kc_lk_addr,
  input  logic      kc_hit,
  input  ks_entry_t kc_entry,
  output logic      kc_ins_valid,
  output addr_t     kc_ins_addr,
  output ks_entry_t kc_ins_entry,
  input  logic      q_pop_valid,
  output logic      q_pop_ready,
  input  ks_entry_t q_entry,
  output logic      net_valid,
  input  logic      net_ready,
  output msg_t      net_msg,
  output logic      ev_kc_hit,
  output logic      ev_q_pop,
  output logic      ev_stall
);

  typedef enum logic [1:0] {E_IDLE, E_SELECT, E_TAG, E_SEND} est_t;
  est_t st;
  tx_req_t req;
  ks_entry_t sel;
  logic use_cache, use_queue, start_tag, tag_done;
  aes_blk_t c1, c2, tag;
  block_t ct_q;
  cnt_t   cnt_q;

  assign tx_ready   = (st == E_IDLE) && h_valid;
  assign kc_lk_addr = req.addr;

  always_comb begin
    use_cache = (st == E_SELECT) && (req.state == ST_O) && kc_hit;
    use_queue = (st == E_SELECT) && !use_cache && q_pop_valid;
    sel       = use_cache ? kc_entry : q_entry;
  end

  assign q_pop_ready  = use_queue;
  assign start_tag    = use_cache || use_queue;
  assign kc_ins_valid = use_queue;
  assign kc_ins_addr  = req.addr;
  assign kc_ins_entry = q_entry;
  assign c1 = req.data[127:0]   ^ sel.ks.pad1;
  assign c2 = req.data[255:128] ^ sel.ks.pad2;

  assign ev_kc_hit = use_cache;
  assign ev_q_pop  = use_queue;
  assign ev_stall  = (st == E_SELECT) && !start_tag;

  gcm_tag u_tag (
    .clk(clk), .rst_n(rst_n), .h(h), .in_valid(start_tag), .addr(req.addr),
    .c1(c1), .c2(c2), .mac_pad(sel.ks.mac_pad), .out_valid(tag_done), .tag(tag)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= E_IDLE;
      req <= '0;
      ct_q <= '0;
      cnt_q <= '0;
      net_valid <= 1'b0;
      net_msg <= '0;
    end else begin
      unique case (st)
        E_IDLE:   if (tx_valid && tx_ready) begin req <= tx_req; st <= E_SELECT; end
        E_SELECT: if (start_tag) begin
                    ct_q  <= {c2, c1};
                    cnt_q <= sel.cnt;
                    st    <= E_TAG;
                  end
        E_TAG:    if (tag_done) begin
                    net_valid <= 1'b1;
                    net_msg   <= '{dest: req.dest, addr: req.addr, data: ct_q, tag: tag, cnt: cnt_q};
                    st        <= E_SEND;
                  end
        E_SEND:   if (net_ready) begin net_valid <= 1'b0; st <= E_IDLE; end
        default:  st <= E_IDLE;
      endcase
    end
  end

endmodule
