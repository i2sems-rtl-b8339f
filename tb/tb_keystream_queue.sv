// tb_keystream_queue: plays the GCC (replies after a delay with a fresh
// block of CR counters) and the generator (pushes the CR keystreams of a
// refill job one by one) around the queue, while a consumer pops at random.
// Checks: a request goes out exactly when fewer than CR counters are owned
// and none is outstanding, entries come out in counter order with their
// data, the level never exceeds 2*CR, and an empty queue offers nothing.
module tb_keystream_queue;
  import i2sems_pkg::*;
  localparam int CR = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic gcc_req, gcc_req_ack, gcc_rsp_valid, gen_valid, gen_ready, push_valid, pop_valid, pop_ready;
  cnt_t gcc_rsp_base, gen_base;
  ks_entry_t push_entry, pop_entry;
  int checks = 0, failures = 0;

  keystream_queue #(.CR(CR)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic keystream_t fake_ks(input cnt_t c);
    return {c * 3, ~c, c ^ 64'h5555, c + 7, 128'(c) << 5, c};
  endfunction

  // GCC model
  cnt_t next_base = 64'd1;
  int owned_model = 0, outstanding = 0, reqs = 0, empties = 0;
  cnt_t exp_cnt = 64'd1;
  initial begin
    gcc_req_ack = 0; gcc_rsp_valid = 0; gcc_rsp_base = '0;
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (gcc_req) begin
        check(owned_model < CR && outstanding == 0, "request only below CR");
        reqs++;
        gcc_req_ack <= 1; outstanding = 1;
        @(posedge clk); gcc_req_ack <= 0;
        repeat ($urandom_range(5, 30)) @(posedge clk);
        check(!gcc_req, "single outstanding request");
        gcc_rsp_valid <= 1; gcc_rsp_base <= next_base;
        owned_model += CR; outstanding = 0;
        next_base += CR;
        @(posedge clk); gcc_rsp_valid <= 0;
      end
    end
  end

  // generator model
  initial begin
    push_valid = 0; push_entry = '0; gen_ready = 0;
    wait (rst_n);
    forever begin
      @(posedge clk);
      gen_ready <= 1;
      if (gen_valid && gen_ready) begin
        cnt_t b;
        b = gen_base;
        gen_ready <= 0;
        for (int i = 0; i < CR; i++) begin
          repeat ($urandom_range(1, 4)) @(posedge clk);
          push_valid <= 1; push_entry <= '{cnt: b + cnt_t'(i), ks: fake_ks(b + cnt_t'(i))};
          @(posedge clk); push_valid <= 0;
        end
      end
    end
  end

  // consumer
  int pops = 0;
  always @(posedge clk) if (rst_n) begin
    check(dut.count <= 2*CR, "level within 2*CR");
    if (!pop_valid) empties++;
    if (pop_valid && pop_ready) begin
      check(pop_entry.cnt == exp_cnt, $sformatf("counter order %0d vs %0d", pop_entry.cnt, exp_cnt));
      check(pop_entry.ks == fake_ks(pop_entry.cnt), "keystream data");
      exp_cnt++;
      owned_model--;
      pops++;
    end
    pop_ready <= ($urandom_range(0, 3) == 0);
  end

  initial begin
    pop_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (pops >= 40);
    check(reqs >= 10, "refills requested");
    check(empties > 0, "empty queue seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
