// tb_aes128_pipe: checks the AES-128 engine against published FIPS-197 and
// GCM test vectors, with blocks issued back to back, and checks that every
// result appears exactly LATENCY (80) cycles after its block entered and
// keeps its tag.
module tb_aes128_pipe;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic [127:0] key;
  logic in_valid;
  logic [7:0] in_tag, out_tag;
  logic [127:0] in_blk, out_blk;
  logic out_valid;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  aes128_pipe #(.TAG_W(8)) dut (.*);

  logic [127:0] exp_q [$];
  logic [7:0]   tag_q [$];
  int           t_q   [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [127:0] e; logic [7:0] t; int t0;
    e = exp_q.pop_front(); t = tag_q.pop_front(); t0 = t_q.pop_front();
    check(out_blk == e, $sformatf("block %h expected %h at %0d tag %0d", out_blk, e, cyc, out_tag));
    check(out_tag == t, "tag");
    check(cyc - t0 == 80, $sformatf("latency %0d", cyc - t0));
  end

  task automatic send(input logic [127:0] pt, input logic [127:0] ct, input logic [7:0] t);
    in_valid <= 1'b1; in_blk <= pt; in_tag <= t;
    exp_q.push_back(ct); tag_q.push_back(t); t_q.push_back(cyc + 1);
    @(posedge clk);
    in_valid <= 1'b0;
  endtask

  initial begin
    in_valid = 1'b0; in_blk = '0; in_tag = '0;
    key = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // key = 0: hash key H and two GCM counter blocks (GCM spec test cases 1-2)
    send(128'h0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e, 8'd1);
    send(128'h00000000000000000000000000000001, 128'h58e2fccefa7e3061367f1d57a4e7455a, 8'd2);
    send(128'h00000000000000000000000000000002, 128'h0388dace60b6a392f328c2b971b2fe78, 8'd3);
    repeat (100) @(posedge clk);
    check(exp_q.size() == 0, "all key-0 results seen");
    key = 128'h000102030405060708090a0b0c0d0e0f;   // FIPS-197 C.1
    send(128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 8'd4);
    repeat (100) @(posedge clk);
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;   // FIPS-197 Appendix B
    send(128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32, 8'd5);
    repeat (100) @(posedge clk);
    check(exp_q.size() == 0, "all results seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
