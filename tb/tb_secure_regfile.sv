// tb_secure_regfile: random write-back, decrypt and encrypt writes against a
// behavioural model of the register file with its GPRF, ERF, SRF, S and M
// parts; after every write all read ports (operand, store data in and out of
// a sensitive block, controller view) are compared with the model.
module tb_secure_regfile;
  import secsoc_pkg::*;

  logic clk = 0, rst_n = 0;
  reg_idx_t rs1_addr = 0, rs2_addr = 0, wb_addr = 0, st_addr = 0, q_addr = 0;
  word_t rs1_data, rs2_data, wb_data = 0, st_data, q_plain, x_plain = 0;
  logic rs1_sens, rs2_sens, wb_we = 0, wb_load = 0, wb_secure = 0, wb_sens = 0;
  logic [1:0] wb_lane = 0, st_lane = 0;
  logic st_secure = 0, q_sens, q_mod, dec_we = 0, enc_we = 0;
  logic [127:0] q_cipher, x_cipher = 0;
  int checks = 0, failures = 0;

  secure_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  word_t mc [32][4];   // ciphertext lanes (lane 0 = gprf)
  word_t ms [32];      // srf
  logic  mS [32], mM [32];

  function automatic word_t m_read(input int a);
    if (a == 0) return 0;
    return mS[a] ? ms[a] : mc[a][0];
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int kind, a, l;
    int n_secload = 0, n_taint = 0, n_dec = 0, n_enc = 0, n_plain = 0;
    for (int r = 0; r < 32; r++) begin
      mS[r] = 0; mM[r] = 0; ms[r] = 0;
      for (int j = 0; j < 4; j++) mc[r][j] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // clear every register through the write-back port first
    for (int r = 1; r < 32; r++) begin
      @(negedge clk);
      wb_we = 1; wb_addr = 5'(r); wb_data = 0; wb_load = 0; wb_sens = 1; wb_secure = 0;
      @(negedge clk);
      wb_sens = 0; x_plain = 0; x_cipher = 0; enc_we = 1; wb_we = 0; q_addr = 5'(r);
      @(negedge clk);
      enc_we = 0; wb_we = 1; wb_sens = 0;
      @(negedge clk);
      wb_we = 0;
    end
    for (int r = 1; r < 32; r++) begin mS[r] = 0; mM[r] = 0; end
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      kind = $urandom_range(0, 5);
      a = $urandom_range(0, 31);
      l = $urandom_range(0, 3);
      wb_we = 0; dec_we = 0; enc_we = 0;
      wb_addr = 5'(a); q_addr = 5'(a);
      wb_data = $urandom; x_plain = $urandom;
      x_cipher = {$urandom, $urandom, $urandom, $urandom};
      case (kind)
        0: begin  // secure load lane
          wb_we = 1; wb_load = 1; wb_secure = 1; wb_lane = 2'(l); wb_sens = 0;
          if (a != 0) begin mc[a][l] = wb_data; mS[a] = 1; mM[a] = 0; end
          n_secload++;
        end
        1: begin  // plain load
          wb_we = 1; wb_load = 1; wb_secure = 0; wb_sens = 0;
          if (a != 0) begin mc[a][0] = wb_data; mS[a] = 0; mM[a] = 0; end
          n_plain++;
        end
        2: begin  // tainted ALU result
          wb_we = 1; wb_load = 0; wb_secure = 0; wb_sens = 1;
          if (a != 0) begin ms[a] = wb_data; mS[a] = 1; mM[a] = 1; end
          n_taint++;
        end
        3: begin  // plain ALU result
          wb_we = 1; wb_load = 0; wb_secure = 0; wb_sens = 0;
          if (a != 0) begin mc[a][0] = wb_data; mS[a] = 0; mM[a] = 0; end
        end
        4: begin  // decrypted value from the SMU
          dec_we = 1;
          if (a != 0) begin ms[a] = x_plain; mS[a] = 1; mM[a] = 0; end
          n_dec++;
        end
        default: begin  // fresh ciphertext from the SMU
          enc_we = 1;
          if (a != 0) begin
            ms[a] = x_plain; mS[a] = 1; mM[a] = 0;
            for (int j = 0; j < 4; j++) mc[a][j] = x_cipher[127 - 32*j -: 32];
          end
          n_enc++;
        end
      endcase
      @(negedge clk);
      wb_we = 0; dec_we = 0; enc_we = 0;
      rs1_addr = 5'($urandom_range(0, 31));
      rs2_addr = 5'(a);
      st_addr = 5'(a);
      q_addr = 5'($urandom_range(0, 31));
      st_lane = 2'($urandom_range(0, 3));
      st_secure = $urandom_range(0, 1);
      #1;
      check(rs1_data == m_read(rs1_addr), $sformatf("rs1 x%0d", rs1_addr));
      check(rs2_data == m_read(a), $sformatf("rs2 x%0d", a));
      if (rs1_addr != 0) check(rs1_sens == mS[rs1_addr], "rs1_sens");
      if (a != 0) check(rs2_sens == mS[a], $sformatf("rs2_sens x%0d", a));
      if (a == 0) check(st_data == 0, "x0 store");
      else if (st_secure) check(st_data == mc[a][st_lane], $sformatf("store lane x%0d", a));
      else check(st_data == (mS[a] ? 0 : mc[a][0]), $sformatf("store plain x%0d", a));
      if (q_addr != 0) begin
        check(q_sens == mS[q_addr] && q_mod == mM[q_addr], "controller S/M");
        check(q_cipher == {mc[q_addr][0], mc[q_addr][1], mc[q_addr][2], mc[q_addr][3]}, "controller cipher");
        check(q_plain == m_read(q_addr), "controller plain");
      end
    end
    check(n_secload > 0 && n_taint > 0 && n_dec > 0 && n_enc > 0 && n_plain > 0, "all write kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
