// msg_decrypt: decryption path for messages arriving at a processor.
//
// On arrival the counter carried by the message is looked up in the keystream
// pool and, at the same moment, a prediction job for that counter and the
// next p-1 is handed to the keystream generator, whether or not the pool
// will hit. On a pool hit (keystream hit) the block is decrypted the cycle
// after the lookup; on a miss the path waits for the generator to deliver
// the keystream of the message's own counter (one AES latency plus issue
// time). The other p-1 keystreams go to the pool for later messages.
// Decryption is an XOR with the two pads. The plaintext is released at once;
// the tag is recomputed over address and ciphertext (six cycles) and compared
// with the tag in the message, and only then is auth_valid pulsed with
// auth_fail set on a mismatch: a lazy alert, off the critical path.
//
// One message at a time: net_ready is high in the idle state when the hash
// key is known and the generator can take a new prediction job.
// Interface: net_valid/net_ready/net_msg in; pl_* to the pool; gen_* to the
// generator; rx_valid/rx_addr/rx_data and auth_valid/auth_fail out; one-cycle
// event pulses ev_pool_hit and ev_pool_miss.
// The message's destination field is not read: the interconnect has already
// delivered the message here, so those bits are deliberately left unused.
// The pool lookup and the prediction job both take the message's counter
// straight from the input in the cycle the message is accepted.
module msg_decrypt
  import i2sems_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  aes_blk_t   h,
  input  logic       h_valid,
  input  logic       net_valid,
  output logic       net_ready,
  input  msg_t       net_msg,
  output logic       pl_lk_valid,
  output cnt_t       pl_lk_cnt,
  input  logic       pl_done,
  input  logic       pl_hit,
  input  keystream_t pl_ks,
  output logic       gen_valid,
  input  logic       gen_ready,
  output cnt_t       gen_cnt,
  input  logic       ks_valid,
  input  ks_dest_t   ks_dest,
  input  ks_entry_t  ks_in,
  output logic       rx_valid,
  output addr_t      rx_addr,
  output block_t     rx_data,
  output logic       auth_valid,
  output logic       auth_fail,
  output logic       ev_pool_hit,
  output logic       ev_pool_miss
);

  typedef enum logic [1:0] {D_IDLE, D_LOOKUP, D_WAIT, D_AUTH} dst_t;
  dst_t st;
  msg_t m;
  logic accept, have_ks, tag_done;
  keystream_t ks;
  aes_blk_t tag;

  assign net_ready   = (st == D_IDLE) && h_valid && gen_ready;
  assign accept      = net_valid && net_ready;
  assign pl_lk_valid = accept;
  assign pl_lk_cnt   = net_msg.cnt;
  assign gen_valid   = accept;
  assign gen_cnt     = net_msg.cnt;

  always_comb begin
    have_ks = 1'b0;
    ks      = pl_ks;
    if (st == D_LOOKUP && pl_done && pl_hit) have_ks = 1'b1;
    if ((st == D_LOOKUP && pl_done && !pl_hit) || st == D_WAIT) begin
      ks = ks_in.ks;
      have_ks = ks_valid && ks_dest == KD_RX && ks_in.cnt == m.cnt;
    end
  end

  assign ev_pool_hit  = (st == D_LOOKUP) && pl_done && pl_hit;
  assign ev_pool_miss = (st == D_LOOKUP) && pl_done && !pl_hit;

  gcm_tag u_tag (
    .clk(clk), .rst_n(rst_n), .h(h), .in_valid(have_ks), .addr(m.addr),
    .c1(m.data[127:0]), .c2(m.data[255:128]), .mac_pad(ks.mac_pad),
    .out_valid(tag_done), .tag(tag)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= D_IDLE;
      m <= '0;
      rx_valid <= 1'b0; rx_addr <= '0; rx_data <= '0;
      auth_valid <= 1'b0; auth_fail <= 1'b0;
    end else begin
      rx_valid   <= 1'b0;
      auth_valid <= 1'b0;
      unique case (st)
        D_IDLE:   if (accept) begin m <= net_msg; st <= D_LOOKUP; end
        D_LOOKUP, D_WAIT: begin
          if (have_ks) begin
            rx_valid <= 1'b1;
            rx_addr  <= m.addr;
            rx_data  <= m.data ^ {ks.pad2, ks.pad1};
            st       <= D_AUTH;
          end else if (st == D_LOOKUP && pl_done) begin
            st <= D_WAIT;
          end
        end
        D_AUTH: if (tag_done) begin
          auth_valid <= 1'b1;
          auth_fail  <= (tag != m.tag);
          st         <= D_IDLE;
        end
        default: st <= D_IDLE;
      endcase
    end
  end

endmodule
