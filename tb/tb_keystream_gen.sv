// tb_keystream_gen: checks the hash key, the keystreams of a queue refill
// (CR counters, one every 3*AES_II cycles) and of a prediction run (p
// counters, the first marked for the waiting decryption) against the
// reference AES, and that a prediction run overtakes a refill in progress.
// The reference AES itself is first checked on a FIPS-197 vector.
module tb_keystream_gen;
  import i2sems_pkg::*;
  import aes_ref_pkg::*;
  localparam int CR = 8, P = 5, II = 5, LAT = 80;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  aes_blk_t key, h;
  logic h_valid, rx_valid, rx_ready, q_valid, q_ready, bc_valid, ks_valid;
  cnt_t rx_cnt, q_base, bc_base;
  ks_dest_t ks_dest;
  ks_entry_t ks_out;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  keystream_gen #(.AES_LATENCY(LAT), .AES_II(II), .CR(CR), .PRED_DEPTH(P)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef struct { ks_dest_t d; cnt_t c; int t; } ev_t;
  ev_t evs [$];
  always @(posedge clk) if (rst_n && ks_valid) begin
    check(ks_out.ks == keystream(key, ks_out.cnt), $sformatf("keystream of %0d", ks_out.cnt));
    evs.push_back('{ks_dest, ks_out.cnt, cyc});
  end

  initial begin
    check(aes(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
          == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference AES");
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    rx_valid = 0; q_valid = 0; bc_valid = 0; rx_cnt = '0; q_base = '0; bc_base = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (h_valid);
    check(h == aes(key, '0), "hash key");
    @(posedge clk);
    // queue refill of CR counters starting at 100
    q_valid <= 1; q_base <= 100;
    @(posedge clk); q_valid <= 0;
    @(posedge clk);
    check(!q_ready, "refill accepted");
    repeat (40) @(posedge clk);
    // a message with counter 5000 arrives during the refill
    rx_valid <= 1; rx_cnt <= 5000;
    @(posedge clk); rx_valid <= 0;
    // a broadcast of counters 9000.. and a newer one replacing it
    bc_valid <= 1; bc_base <= 9000;
    @(posedge clk); bc_valid <= 0;
    repeat (200) @(posedge clk);
    bc_valid <= 1; bc_base <= 9100;
    @(posedge clk); bc_valid <= 0;
    repeat (2000) @(posedge clk);
    begin
      int nq = 0, nrx = 0, npool = 0, first_rx_idx = -1, last_q_idx = -1, nbc_new = 0;
      for (int i = 0; i < evs.size(); i++) begin
        case (evs[i].d)
          KD_QUEUE: begin
            check(evs[i].c == cnt_t'(100 + nq), "queue counters in order");
            if (nq > 0 && nq < 3) check(evs[i].t - evs[i-1].t == 3*II, "refill rate one keystream per 3*AES_II");
            nq++; last_q_idx = i;
          end
          KD_RX: begin
            check(evs[i].c == 5000, "first predicted counter goes to decryption");
            nrx++; first_rx_idx = i;
          end
          default: begin
            if (evs[i].c >= 5001 && evs[i].c <= 5004) npool++;
            if (evs[i].c >= 9100 && evs[i].c < 9100 + CR) nbc_new++;
          end
        endcase
      end
      check(nq == CR, $sformatf("CR queue keystreams (%0d)", nq));
      check(nrx == 1, "one keystream for the waiting message");
      check(npool == P - 1, "p-1 predicted keystreams to the pool");
      check(nbc_new == CR, "newest broadcast fully generated");
      check(first_rx_idx < last_q_idx, "prediction overtakes the refill");
    end
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
