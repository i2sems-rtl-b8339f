// aes128_pipe: AES-128 encryption engine that produces the keystreams.
//
// Fully pipelined, one AES round per register stage (11 stages: the initial
// AddRoundKey and ten rounds), so a new 128-bit block may enter every cycle.
// The eleven round keys are expanded combinationally from `key`, which is the
// system's shared secret and is expected to stay constant while blocks are in
// flight. A delay line after the last round brings the total latency to
// LATENCY cycles, so the engine shows the keystream generation delay of the
// reference configuration (80 ns at a 1 GHz clock). How fast blocks are
// issued is up to the user (see keystream_gen). A TAG_W-bit tag travels with
// each block so the user can tell the results apart.
//
// Interface: in_valid/in_tag/in_blk are taken every cycle (no back-pressure);
// out_valid/out_tag/out_blk appear exactly LATENCY cycles later, in order.
module aes128_pipe
  import aes_pkg::*;
#(
  parameter int unsigned LATENCY = 80,   // cycles from input to output (>= 11)
  parameter int unsigned TAG_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [127:0]     key,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  logic [127:0]     in_blk,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic [127:0]     out_blk
);

  localparam int unsigned NSTAGE = 11;
  localparam int unsigned NDELAY = LATENCY - NSTAGE;
  localparam logic [87:0] RCON = 88'h00_01_02_04_08_10_20_40_80_1B_36;

  initial assert (LATENCY >= NSTAGE) else $error("aes128_pipe: LATENCY must be >= 11");

  state_t rkey [NSTAGE];

  always_comb begin
    rkey[0] = key;
    for (int r = 1; r < NSTAGE; r++)
      rkey[r] = next_rkey(rkey[r-1], RCON[8*(NSTAGE-1-r) +: 8]);
  end

  state_t           st  [NSTAGE];
  logic             vld [NSTAGE];
  logic [TAG_W-1:0] tg  [NSTAGE];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NSTAGE; i++) vld[i] <= 1'b0;
    end else begin
      vld[0] <= in_valid;
      for (int i = 1; i < NSTAGE; i++) vld[i] <= vld[i-1];
    end
  end

  always_ff @(posedge clk) begin
    st[0] <= in_blk ^ rkey[0];
    tg[0] <= in_tag;
    for (int i = 1; i < NSTAGE - 1; i++) begin
      st[i] <= mix_columns(sub_shift(st[i-1])) ^ rkey[i];
      tg[i] <= tg[i-1];
    end
    st[NSTAGE-1] <= sub_shift(st[NSTAGE-2]) ^ rkey[NSTAGE-1];
    tg[NSTAGE-1] <= tg[NSTAGE-2];
  end

  generate
    if (NDELAY == 0) begin : g_nodelay
      assign out_valid = vld[NSTAGE-1];
      assign out_tag   = tg[NSTAGE-1];
      assign out_blk   = st[NSTAGE-1];
    end else begin : g_delay
      logic             dv [NDELAY];
      logic [TAG_W-1:0] dt [NDELAY];
      state_t           ds [NDELAY];
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          for (int i = 0; i < NDELAY; i++) dv[i] <= 1'b0;
        end else begin
          dv[0] <= vld[NSTAGE-1];
          for (int i = 1; i < NDELAY; i++) dv[i] <= dv[i-1];
        end
      end
      always_ff @(posedge clk) begin
        dt[0] <= tg[NSTAGE-1];
        ds[0] <= st[NSTAGE-1];
        for (int i = 1; i < NDELAY; i++) begin
          dt[i] <= dt[i-1];
          ds[i] <= ds[i-1];
        end
      end
      assign out_valid = dv[NDELAY-1];
      assign out_tag   = dt[NDELAY-1];
      assign out_blk   = ds[NDELAY-1];
    end
  endgenerate

endmodule
