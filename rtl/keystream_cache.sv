// keystream_cache: small fully associative cache of the counters and
// keystreams this processor has used to encrypt blocks with fresh counters.
//
// When a block in the Owned state is sent again its data has not changed, so
// the counter and keystream used for it before can be used again without
// weakening the cipher. Each entry holds {block address, counter, keystream};
// the lookup compares the block address against all ENTRIES tags in parallel
// (combinational, so it can run alongside the system-cache access). Inserting
// an address that is already present overwrites that entry, so a block that
// was modified and re-encrypted with a new counter never hits on its old one.
// Otherwise the first invalid entry is used, or, when all are valid, the entry
// named by a round-robin pointer (replacement policy is this design's choice:
// the reference sizing gives only 32 entries, fully associative).
//
// Interface: lk_addr -> lk_hit/lk_entry (same cycle); ins_valid/ins_addr/
// ins_entry write at the clock edge. Addresses are byte addresses; the low
// five bits (offset in a 32-byte block) are ignored.
module keystream_cache
  import i2sems_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  addr_t     lk_addr,
  output logic      lk_hit,
  output ks_entry_t lk_entry,
  input  logic      ins_valid,
  input  addr_t     ins_addr,
  input  ks_entry_t ins_entry
);

  localparam int unsigned OFS = 5;                 // 32-byte blocks
  localparam int unsigned IW  = $clog2(ENTRIES);
  typedef logic [ADDR_W-OFS-1:0] baddr_t;

  logic [ENTRIES-1:0] valid;
  baddr_t    tag   [ENTRIES];
  ks_entry_t data  [ENTRIES];
  logic [IW-1:0] rr;

  baddr_t lk_b, ins_b;
  assign lk_b  = lk_addr[ADDR_W-1:OFS];
  assign ins_b = ins_addr[ADDR_W-1:OFS];

  always_comb begin
    lk_hit   = 1'b0;
    lk_entry = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (valid[i] && tag[i] == lk_b) begin
        lk_hit   = 1'b1;
        lk_entry = data[i];
      end
  end

  // where an insertion goes: matching entry, else first free, else round robin
  logic [ENTRIES-1:0] ins_match;
  logic [IW-1:0] ins_idx;
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) ins_match[i] = valid[i] && (tag[i] == ins_b);
  end
  always_comb begin
    ins_idx = rr;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!valid[i]) ins_idx = IW'(i);
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (ins_match[i]) ins_idx = IW'(i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
      rr <= '0;
    end else if (ins_valid) begin
      valid[ins_idx] <= 1'b1;
      tag[ins_idx]   <= ins_b;
      data[ins_idx]  <= ins_entry;
      if (ins_idx == rr) rr <= (rr == IW'(ENTRIES - 1)) ? '0 : rr + 1'b1;
    end
  end

endmodule
