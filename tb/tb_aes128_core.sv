// tb_aes128_core: checks the iterative AES-128 core against the FIPS-197
// known-answer vectors and against an independent behavioural AES on random
// keys and blocks, in both directions, and checks the cycle count of each
// operation (10 edges for encryption, 20 for decryption).
module tb_aes128_core;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0, decrypt = 0;
  logic [127:0] key = '0, din = '0, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  aes128_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic dec, input logic [127:0] k, input logic [127:0] d,
                     input logic [127:0] exp_out, input string what);
    int cyc;
    @(negedge clk);
    key = k; din = d; decrypt = dec; start = 1;
    @(posedge clk);
    #1 start = 0;
    cyc = 0;
    while (!done) begin
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (dout !== exp_out) begin
      failures++;
      $display("FAIL %s dec=%0d out=%h exp=%h", what, dec, dout, exp_out);
    end
    checks++;
    if (cyc != (dec ? 20 : 10)) begin
      failures++;
      $display("FAIL %s latency %0d", what, cyc);
    end
  endtask

  initial begin
    logic [127:0] k, p;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // FIPS-197 Appendix C.1 and Appendix B
    run(0, 128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a, "C1 enc");
    run(1, 128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
        128'h00112233445566778899aabbccddeeff, "C1 dec");
    run(0, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32, "B enc");
    // the reference itself must agree with the published vectors
    checks++;
    if (encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++; $display("FAIL reference model");
    end
    for (int i = 0; i < 40; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(0, k, p, aes_ref_pkg::encrypt(k, p), "rand enc");
      run(1, k, p, aes_ref_pkg::decrypt(k, p), "rand dec");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
