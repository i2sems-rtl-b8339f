// keystream_queue: FIFO of precomputed {counter, keystream} pairs that this
// processor uses to encrypt outgoing blocks with fresh counters.
//
// The queue keeps track of how many counters it owns: those already turned
// into keystreams and stored, plus those assigned by the Global Counter
// Controller (GCC) but still being generated. When that number falls below
// the counter reserve CR it asks the GCC for a new block of CR counters, and
// it never has more than one request outstanding, so requests and replies
// cannot be reordered. The GCC's reply (the first counter of the block) is
// handed to the keystream generator as a refill job; the generated keystreams
// come back on push_*. Because a request is made only below CR and brings
// exactly CR counters, the storage never needs more than 2*CR entries.
// A pop from an empty queue is simply not offered (pop_valid low): the
// encryption path stalls until the refill arrives.
//
// Interface: gcc_req is held high until gcc_req_ack; gcc_rsp_valid/base is a
// one-cycle reply; gen_valid/gen_ready/gen_base is the refill job to the
// generator; push_valid/push_entry come from the generator (never refused);
// pop_valid/pop_ready/pop_entry is a valid-ready read port showing the head.
module keystream_queue
  import i2sems_pkg::*;
#(
  parameter int unsigned CR    = 32,
  parameter int unsigned DEPTH = 2 * CR
) (
  input  logic      clk,
  input  logic      rst_n,
  output logic      gcc_req,
  input  logic      gcc_req_ack,
  input  logic      gcc_rsp_valid,
  input  cnt_t      gcc_rsp_base,
  output logic      gen_valid,
  input  logic      gen_ready,
  output cnt_t      gen_base,
  input  logic      push_valid,
  input  ks_entry_t push_entry,
  output logic      pop_valid,
  input  logic      pop_ready,
  output ks_entry_t pop_entry
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned OW = $clog2(DEPTH + CR + 1);

  ks_entry_t mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [OW-1:0] owned;          // stored + assigned but not yet generated
  logic outstanding;             // a request is waiting for its reply
  logic do_push, do_pop;

  assign do_push   = push_valid;
  assign do_pop    = pop_valid && pop_ready;
  assign pop_valid = (count != '0);
  assign pop_entry = mem[rptr];
  assign gcc_req   = !outstanding && (owned < OW'(CR));

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= push_entry;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; count <= '0; owned <= '0;
      outstanding <= 1'b0; gen_valid <= 1'b0; gen_base <= '0;
    end else begin
      if (do_push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
      owned <= owned + (gcc_rsp_valid ? OW'(CR) : '0) - OW'(do_pop);
      if (gcc_req && gcc_req_ack) outstanding <= 1'b1;
      if (gcc_rsp_valid) begin
        outstanding <= 1'b0;
        gen_valid   <= 1'b1;
        gen_base    <= gcc_rsp_base;
      end else if (gen_valid && gen_ready) begin
        gen_valid <= 1'b0;
      end
    end
  end

  // The reserve rule keeps the FIFO from overflowing.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  do_push |-> (count < DEPTH[$bits(count)-1:0] || do_pop))
    else $error("keystream_queue overflow");
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   gcc_rsp_valid |-> outstanding)
    else $error("keystream_queue: GCC reply without a request");

endmodule
