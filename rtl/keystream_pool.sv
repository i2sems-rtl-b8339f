// keystream_pool: set-associative store of precomputed keystreams used to
// decrypt incoming messages without waiting for AES.
//
// It is filled with keystreams of counters the processor expects to see:
// the blocks of counters the GCC broadcasts when it assigns them to other
// processors, and the p-1 counters following the counter of each arriving
// message (prediction). An arriving message is looked up by the counter it
// carries. Counters are handed out in increasing order, so the set index is
// simply the low bits of the counter and the tag the rest; consecutive
// counters fall into consecutive sets and rarely contend.
// The reference size is 512 KB of keystream, 4-way: counting 32 bytes of data
// pad per entry (the MAC pad and tag are overhead, as tags are in a normal
// cache) that is 16384 entries in 4096 sets. Each way is a memory with one
// read and one write port; the valid bits and the per-set round-robin victim
// pointers are flip-flops so that reset can clear them. A write goes to the
// way under the set's round-robin pointer (replacement policy and the
// handling of duplicates are this design's choices; a duplicate only wastes
// space since both copies hold the same keystream).
//
// Interface: lk_valid/lk_cnt at cycle t -> lk_done/lk_hit/lk_ks at t+1.
// wr_valid/wr_entry writes at the clock edge. No stalls.
module keystream_pool
  import i2sems_pkg::*;
#(
  parameter int unsigned POOL_BYTES = 524288,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned KS_BYTES   = 32     // bytes of keystream per entry
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       lk_valid,
  input  cnt_t       lk_cnt,
  output logic       lk_done,
  output logic       lk_hit,
  output keystream_t lk_ks,
  input  logic       wr_valid,
  input  ks_entry_t  wr_entry
);

  localparam int unsigned ENTRIES = POOL_BYTES / KS_BYTES;
  localparam int unsigned SETS    = ENTRIES / WAYS;
  localparam int unsigned IW      = $clog2(SETS);
  localparam int unsigned TW      = CNT_W - IW;
  localparam int unsigned WW      = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [IW-1:0] idx_t;
  typedef logic [TW-1:0] tag_t;

  idx_t lk_idx, wr_idx;
  tag_t lk_tag_q;
  assign lk_idx = lk_cnt[IW-1:0];
  assign wr_idx = wr_entry.cnt[IW-1:0];

  logic [SETS-1:0][WW-1:0] rr;      // per-set round-robin victim
  logic [WW-1:0] victim;
  assign victim = rr[wr_idx];

  logic       rd_vld [WAYS];
  tag_t       rd_tag [WAYS];
  keystream_t rd_ks  [WAYS];

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [SETS-1:0] vbit;
    tag_t            tag_mem [SETS];
    keystream_t      ks_mem  [SETS];
    logic            we;
    assign we = wr_valid && (victim == WW'(w));

    always_ff @(posedge clk) begin
      if (we) begin
        tag_mem[wr_idx] <= wr_entry.cnt[CNT_W-1:IW];
        ks_mem[wr_idx]  <= wr_entry.ks;
      end
      rd_tag[w] <= tag_mem[lk_idx];
      rd_ks[w]  <= ks_mem[lk_idx];
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        vbit      <= '0;
        rd_vld[w] <= 1'b0;
      end else begin
        if (we) vbit[wr_idx] <= 1'b1;
        rd_vld[w] <= vbit[lk_idx];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr       <= '0;
      lk_done  <= 1'b0;
      lk_tag_q <= '0;
    end else begin
      if (wr_valid) rr[wr_idx] <= (victim == WW'(WAYS - 1)) ? '0 : victim + 1'b1;
      lk_done  <= lk_valid;
      lk_tag_q <= lk_cnt[CNT_W-1:IW];
    end
  end

  always_comb begin
    lk_hit = 1'b0;
    lk_ks  = '0;
    for (int w = 0; w < WAYS; w++)
      if (rd_vld[w] && rd_tag[w] == lk_tag_q) begin
        lk_hit = 1'b1;
        lk_ks  = rd_ks[w];
      end
  end

endmodule
