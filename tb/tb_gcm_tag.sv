// tb_gcm_tag: streams random blocks through the tag pipeline, one per cycle
// with gaps, and compares every tag with the reference GCM computation; each
// tag must appear exactly six cycles after its inputs.
module tb_gcm_tag;
  import i2sems_pkg::*;
  import gf128_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  aes_blk_t h, c1, c2, mac_pad, tag;
  addr_t addr;
  logic in_valid, out_valid;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  gcm_tag dut (.*);

  logic [127:0] exp_q [$];
  int t_q [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      check(exp_q.size() > 0, "unexpected tag");
      if (exp_q.size() > 0) begin
        check(tag == exp_q.pop_front(), "tag value");
        check(cyc - t_q.pop_front() == 6, "latency 6");
      end
    end
  end

  initial begin
    in_valid = 0; h = {$urandom, $urandom, $urandom, $urandom};
    addr = '0; c1 = '0; c2 = '0; mac_pad = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 60; i++) begin
      logic v;
      v = (i % 5) != 3;
      in_valid <= v;
      addr <= addr_t'({$urandom} & 32'hFFFF_FFE0);
      c1 <= {$urandom, $urandom, $urandom, $urandom};
      c2 <= {$urandom, $urandom, $urandom, $urandom};
      mac_pad <= {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (v) begin
        exp_q.push_back(gf128_ref_pkg::tag(h, 128'(addr), c1, c2, mac_pad));
        t_q.push_back(cyc);
      end
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "all tags produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
