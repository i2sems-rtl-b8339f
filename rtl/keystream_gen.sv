// keystream_gen: per-processor keystream generator.
//
// One AES-128 engine (aes128_pipe) turns counters into keystreams. For a
// counter c it encrypts three blocks, 0..00||c (MAC pad), 0..01||c (pad of
// the low 16 data bytes) and 0..11||c (pad of the high 16 bytes), issued in
// consecutive issue slots, and emits the assembled keystream once the third
// block leaves the engine. Issue slots are AES_II cycles apart, which models
// an engine throughput of 16 bytes per 5 ns (3.2 GB/s at 1 GHz); the engine
// latency is AES_LATENCY cycles (80 ns).
//
// Work arrives as three kinds of job, each a run of consecutive counters:
//   rx  - a message with counter c arrived: generate c .. c+PRED_DEPTH-1; the
//         first goes to the waiting decryption (dest KD_RX), the others to the
//         keystream pool (prediction depth p = 5).
//   q   - the GCC assigned counters base .. base+CR-1 to this processor: they go
//         to the keystream queue.
//   bc  - the GCC broadcast another processor's assignment: base .. base+CR-1
//         go to the keystream pool. A new broadcast replaces the rest of an
//         unfinished one (own choice: the newest counters are the likeliest to
//         be used).
// Before any job, right after reset, the engine computes the GCM hash key
// H = AES_K(0^128), output on `h` with `h_valid`. A new counter is chosen per
// issue slot with priority rx > q > bc, so a waiting decryption never sits
// behind a long queue refill (own choice; the priority is not specified).
// A processor's security unit holds two instances, one per AES unit of its
// architecture: one is given only q jobs, the other rx and bc jobs.
//
// Interface: rx_valid/rx_ready/rx_cnt, q_valid/q_ready/q_base take jobs
// (valid & ready); bc_valid/bc_base is always taken. Results appear as
// one-cycle pulses ks_valid/ks_dest/ks_out with no back-pressure.
module keystream_gen
  import i2sems_pkg::*;
#(
  parameter int unsigned AES_LATENCY = 80,
  parameter int unsigned AES_II      = 5,
  parameter int unsigned CR          = 32,
  parameter int unsigned PRED_DEPTH  = 5
) (
  input  logic      clk,
  input  logic      rst_n,
  input  aes_blk_t  key,
  output aes_blk_t  h,
  output logic      h_valid,
  input  logic      rx_valid,
  output logic      rx_ready,
  input  cnt_t      rx_cnt,
  input  logic      q_valid,
  output logic      q_ready,
  input  cnt_t      q_base,
  input  logic      bc_valid,
  input  cnt_t      bc_base,
  output logic      ks_valid,
  output ks_dest_t  ks_dest,
  output ks_entry_t ks_out
);

  localparam int unsigned LEFT_W = $clog2(CR + PRED_DEPTH + 1);
  typedef logic [LEFT_W-1:0] left_t;

  typedef struct packed {
    ks_dest_t   dest;
    logic [1:0] sub;    // 0: MAC pad, 1: pad1, 2: pad2, 3: hash key
    cnt_t       cnt;
  } aes_tag_t;

  // ---- pending jobs ----
  logic  rx_busy, rx_first, q_busy, bc_busy;
  cnt_t  rx_next, q_next, bc_next;
  left_t rx_left, q_left, bc_left;
  logic  h_pending;

  // ---- counter being issued ----
  logic     cur_valid;
  cnt_t     cur_cnt;
  ks_dest_t cur_dest;
  logic [1:0] cur_sub;
  logic [$clog2(AES_II+1)-1:0] ii_wait;

  logic     issue;
  aes_blk_t aes_in;
  aes_tag_t in_tag, out_tag;
  logic     aes_ov;
  aes_blk_t aes_out;

  assign rx_ready = !rx_busy;
  assign q_ready  = !q_busy;

  // choose the next counter when the current one is fully issued
  logic take_rx, take_q, take_bc;
  always_comb begin
    take_rx = 1'b0; take_q = 1'b0; take_bc = 1'b0;
    if (!h_pending && !cur_valid) begin
      if (rx_busy)      take_rx = 1'b1;
      else if (q_busy)  take_q  = 1'b1;
      else if (bc_busy) take_bc = 1'b1;
    end
  end

  assign issue = (ii_wait == '0) && (h_pending || cur_valid);

  always_comb begin
    if (h_pending) begin
      aes_in = '0;
      in_tag = '{dest: KD_HKEY, sub: 2'd3, cnt: '0};
    end else begin
      unique case (cur_sub)
        2'd0:    aes_in = {PFX_MAC, cur_cnt};
        2'd1:    aes_in = {PFX_D1,  cur_cnt};
        default: aes_in = {PFX_D2,  cur_cnt};
      endcase
      in_tag = '{dest: cur_dest, sub: cur_sub, cnt: cur_cnt};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_busy <= 1'b0; q_busy <= 1'b0; bc_busy <= 1'b0; rx_first <= 1'b0;
      rx_next <= '0; q_next <= '0; bc_next <= '0;
      rx_left <= '0; q_left <= '0; bc_left <= '0;
      h_pending <= 1'b1;
      cur_valid <= 1'b0; cur_cnt <= '0; cur_dest <= KD_POOL; cur_sub <= '0;
      ii_wait <= '0;
    end else begin
      // issue one AES block
      if (issue) begin
        ii_wait <= ($bits(ii_wait))'(AES_II - 1);
        if (h_pending) h_pending <= 1'b0;
        else if (cur_sub == 2'd2) begin
          cur_valid <= 1'b0;
          cur_sub   <= '0;
        end else cur_sub <= cur_sub + 2'd1;
      end else if (ii_wait != '0) begin
        ii_wait <= ii_wait - 1'b1;
      end

      // load the next counter from the highest-priority job
      if (take_rx) begin
        cur_valid <= 1'b1; cur_cnt <= rx_next; cur_sub <= '0;
        cur_dest  <= rx_first ? KD_RX : KD_POOL;
        rx_first  <= 1'b0;
        rx_next   <= rx_next + 1'b1;
        rx_left   <= rx_left - 1'b1;
        if (rx_left == left_t'(1)) rx_busy <= 1'b0;
      end else if (take_q) begin
        cur_valid <= 1'b1; cur_cnt <= q_next; cur_sub <= '0; cur_dest <= KD_QUEUE;
        q_next <= q_next + 1'b1;
        q_left <= q_left - 1'b1;
        if (q_left == left_t'(1)) q_busy <= 1'b0;
      end else if (take_bc) begin
        cur_valid <= 1'b1; cur_cnt <= bc_next; cur_sub <= '0; cur_dest <= KD_POOL;
        bc_next <= bc_next + 1'b1;
        bc_left <= bc_left - 1'b1;
        if (bc_left == left_t'(1)) bc_busy <= 1'b0;
      end

      // accept new jobs
      if (rx_valid && rx_ready) begin
        rx_busy <= 1'b1; rx_first <= 1'b1;
        rx_next <= rx_cnt; rx_left <= left_t'(PRED_DEPTH);
      end
      if (q_valid && q_ready) begin
        q_busy <= 1'b1; q_next <= q_base; q_left <= left_t'(CR);
      end
      if (bc_valid) begin
        bc_busy <= 1'b1; bc_next <= bc_base; bc_left <= left_t'(CR);
      end
    end
  end

  aes128_pipe #(.LATENCY(AES_LATENCY), .TAG_W($bits(aes_tag_t))) u_aes (
    .clk      (clk),
    .rst_n    (rst_n),
    .key      (key),
    .in_valid (issue),
    .in_tag   (in_tag),
    .in_blk   (aes_in),
    .out_valid(aes_ov),
    .out_tag  (out_tag),
    .out_blk  (aes_out)
  );

  // ---- reassemble the three blocks of a counter ----
  aes_blk_t mac_pad_q, pad1_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h_valid <= 1'b0;
      h       <= '0;
      ks_valid <= 1'b0;
      ks_dest  <= KD_POOL;
      ks_out   <= '0;
      mac_pad_q <= '0;
      pad1_q    <= '0;
    end else begin
      ks_valid <= 1'b0;
      if (aes_ov) begin
        unique case (out_tag.sub)
          2'd0: mac_pad_q <= aes_out;
          2'd1: pad1_q    <= aes_out;
          2'd2: begin
            ks_valid <= 1'b1;
            ks_dest  <= out_tag.dest;
            ks_out   <= '{cnt: out_tag.cnt,
                          ks: '{mac_pad: mac_pad_q, pad2: aes_out, pad1: pad1_q}};
          end
          default: begin
            h       <= aes_out;
            h_valid <= 1'b1;
          end
        endcase
      end
    end
  end

endmodule
