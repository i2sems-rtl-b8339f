// gcc: Global Counter Controller, the single system-wide source of counters.
//
// Every counter used to encrypt a block must be unique system-wide. The GCC
// holds the next unassigned counter. When a processor's keystream queue asks
// for counters, the GCC grants the request (round-robin among simultaneous
// requesters, this design's choice), replies to that processor with the
// first counter of a block of CR consecutive counters, and in the same cycle
// broadcasts that block to every other processor so that they can
// precompute its keystreams for decryption. The counter then advances by CR.
// It starts at 1 because counter 0 with the MAC prefix would reproduce the
// AES input of the GCM hash key (own choice; the start value is not given).
//
// Timing: req[i] is a level; req_ack[i] pulses in the cycle the request is
// granted (at most one per cycle); rsp_valid[i]/rsp_base and
// bc_valid[j != i]/bc_base follow one cycle later.
// Messages between the GCC and the processors travel on the interconnect in
// a real system; here they are point-to-point wires.
module gcc
  import i2sems_pkg::*;
#(
  parameter int unsigned N_PROC   = 16,
  parameter int unsigned CR       = 32,
  parameter cnt_t        INIT_CNT = 64'd1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_PROC-1:0] req,
  output logic [N_PROC-1:0] req_ack,
  output logic [N_PROC-1:0] rsp_valid,
  output cnt_t              rsp_base,
  output logic [N_PROC-1:0] bc_valid,
  output cnt_t              bc_base
);

  localparam int unsigned PW = (N_PROC > 1) ? $clog2(N_PROC) : 1;

  cnt_t          next_cnt;
  logic [PW-1:0] ptr;
  logic [PW-1:0] gnt_idx;
  logic          gnt_any;

  // round-robin: first requester at or after ptr
  always_comb begin
    gnt_any = 1'b0;
    gnt_idx = '0;
    for (int k = 0; k < N_PROC; k++) begin
      logic [PW:0] i;
      i = (PW+1)'(ptr) + (PW+1)'(k);
      if (i >= (PW+1)'(N_PROC)) i = i - (PW+1)'(N_PROC);
      if (!gnt_any && req[i[PW-1:0]]) begin
        gnt_any = 1'b1;
        gnt_idx = i[PW-1:0];
      end
    end
  end

  always_comb begin
    req_ack = '0;
    if (gnt_any) req_ack[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      next_cnt  <= INIT_CNT;
      ptr       <= '0;
      rsp_valid <= '0;
      bc_valid  <= '0;
      rsp_base  <= '0;
      bc_base   <= '0;
    end else begin
      rsp_valid <= req_ack;
      bc_valid  <= gnt_any ? ~req_ack : '0;
      if (gnt_any) begin
        rsp_base <= next_cnt;
        bc_base  <= next_cnt;
        next_cnt <= next_cnt + cnt_t'(CR);
        ptr      <= (gnt_idx == PW'(N_PROC - 1)) ? '0 : gnt_idx + 1'b1;
      end
    end
  end

  a_no_wrap: assert property (@(posedge clk) disable iff (!rst_n)
                              gnt_any |-> (next_cnt + cnt_t'(CR) > next_cnt))
    else $error("gcc: counter space exhausted");

endmodule
