// tb_gcc: 16 requesters ask for counters at random and hold their request
// until it is acknowledged. Checks: each grant answers exactly the granted
// requester one cycle later and broadcasts to all the others; blocks start at
// 1, advance by CR and never overlap; when all processors request at once
// every one is served within N_PROC grants (round robin).
module tb_gcc;
  import i2sems_pkg::*;
  localparam int N = 16, CR = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic [N-1:0] req, req_ack, rsp_valid, bc_valid;
  cnt_t rsp_base, bc_base;
  int checks = 0, failures = 0;

  gcc #(.N_PROC(N), .CR(CR)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [N-1:0] last_ack = '0;
  cnt_t exp_base = 64'd1;
  int grants = 0;
  always @(posedge clk) if (rst_n) begin
    check($countones(req_ack) <= 1, "one grant per cycle");
    check((req_ack & ~req) == '0, "grant only to a requester");
    if (last_ack != '0) begin
      check(rsp_valid == last_ack, "reply to the granted processor");
      check(bc_valid == ~last_ack, "broadcast to all others");
      check(rsp_base == exp_base && bc_base == exp_base, $sformatf("block base %0d", rsp_base));
      exp_base += CR;
    end else begin
      check(rsp_valid == '0 && bc_valid == '0, "no spurious reply");
    end
    last_ack = req_ack;
    if (req_ack != '0) grants++;
  end

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // everybody at once: all served within N grants
    @(negedge clk); req = '1;
    for (int g = 0; g < N; g++) begin
      @(negedge clk); req = req & ~last_ack;
    end
    check(req == '0, "all served within N_PROC grants");
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      req = (req & ~last_ack);
      req = req | N'($urandom & $urandom & 16'hFFFF);
    end
    @(negedge clk); req = '0;
    repeat (4) @(posedge clk);
    check(grants > N + 20, "many grants");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
