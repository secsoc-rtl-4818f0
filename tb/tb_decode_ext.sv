// tb_decode_ext: drives instruction sequences through the decode extension
// with simple behavioural stand-ins for the SMU (random hash back-pressure,
// fixed verify and cipher latencies, a recognisable cipher result) and for
// the register file (S/M bits and values per register). Checks the hashed
// word stream, the lane tags, the stalls of load and store blocks, the
// decrypt/encrypt requests and the register writes they cause, the
// skipped encryption of an unmodified register, and every exception cause.
module tb_decode_ext;
  import secsoc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic id_valid = 0, id_stall, id_secure, secure_mode, exc_valid;
  word_t id_instr = 0;
  logic [1:0] id_lane;
  exc_cause_e exc_cause;
  logic pipe_drained = 1, wb_secure_load = 0;
  reg_idx_t q_addr;
  logic q_sens, q_mod, dec_we, enc_we;
  logic [127:0] q_cipher, x_cipher;
  word_t q_plain, x_plain;
  logic [SERIAL_W-1:0] ser_query, fin_serial;
  logic ser_registered;
  logic hash_valid, hash_first, hash_ready = 0;
  word_t hash_word;
  logic fin_valid, fin_ready, verify_done = 0, verify_ok = 0;
  logic crypt_valid, crypt_decrypt, crypt_ready, crypt_done = 0;
  logic [127:0] crypt_data, crypt_result = 0;
  int checks = 0, failures = 0;

  decode_ext dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- SMU stand-in ----------------
  localparam logic [127:0] ENC_MASK = 128'h0f0f_1e1e_2d2d_3c3c_4b4b_5a5a_6969_7878;
  assign ser_registered = ser_query < 12'd4;
  assign fin_ready = 1'b1;
  word_t hashed [$];
  logic  first_flags [$];
  logic  next_ok = 1;
  int vcnt = 0, ccnt = 0, n_crypt = 0, n_dec_req = 0;
  logic [127:0] last_crypt_data;
  logic last_dec;
  assign crypt_ready = (ccnt == 0);
  always @(posedge clk) begin
    hash_ready <= ($urandom_range(0, 3) != 0);
    if (hash_valid && hash_ready) begin
      hashed.push_back(hash_word);
      first_flags.push_back(hash_first);
    end
    verify_done <= 0;
    if (fin_valid && fin_ready) vcnt <= 5;
    else if (vcnt > 0) begin
      vcnt <= vcnt - 1;
      if (vcnt == 1) begin verify_done <= 1; verify_ok <= next_ok; end
    end
    crypt_done <= 0;
    if (crypt_valid && crypt_ready) begin
      ccnt <= 7; last_crypt_data <= crypt_data; last_dec <= crypt_decrypt; n_crypt++;
      if (crypt_decrypt) n_dec_req++;
    end else if (ccnt > 0) begin
      ccnt <= ccnt - 1;
      if (ccnt == 1) begin
        crypt_done <= 1;
        crypt_result <= last_dec ? ~last_crypt_data : (last_crypt_data ^ ENC_MASK);
      end
    end
  end

  // ---------------- register file stand-in ----------------
  logic tS [32], tM [32];
  logic [127:0] tc [32];
  word_t tp [32];
  assign q_sens = tS[q_addr];
  assign q_mod = tM[q_addr];
  assign q_cipher = tc[q_addr];
  assign q_plain = tp[q_addr];
  int n_dec_we = 0, n_enc_we = 0;
  reg_idx_t last_x_addr;
  word_t last_x_plain;
  logic [127:0] last_x_cipher;
  always @(posedge clk) begin
    if (dec_we) begin n_dec_we++; last_x_addr <= q_addr; last_x_plain <= x_plain; end
    if (enc_we) begin n_enc_we++; last_x_addr <= q_addr; last_x_plain <= x_plain; last_x_cipher <= x_cipher; end
  end

  // ---------------- instruction encodings ----------------
  function automatic word_t BEGIN(input int s); return {12'(s), 5'd0, 3'b000, 5'd0, 7'b0010011}; endfunction
  function automatic word_t END_(input int s);  return {12'(s), 5'd1, 3'b000, 5'd0, 7'b0010011}; endfunction
  function automatic word_t LW(input int rd, input int off);
    return {12'(off), 5'd10, 3'b010, 5'(rd), 7'b0000011};
  endfunction
  function automatic word_t SW(input int rs2, input int off);
    logic [11:0] o; o = 12'(off);
    return {o[11:5], 5'(rs2), 5'd11, 3'b010, o[4:0], 7'b0100011};
  endfunction
  function automatic word_t ADD(input int rd, input int a, input int b);
    return {7'd0, 5'(b), 5'(a), 3'b000, 5'(rd), 7'b0110011};
  endfunction

  // offer one instruction until decode takes it
  logic      acc_secure, acc_exc;
  logic [1:0] acc_lane;
  exc_cause_e acc_cause;
  int        acc_stalls;
  task automatic issue(input word_t ins);
    @(negedge clk);
    id_valid = 1; id_instr = ins; acc_stalls = 0;
    #1;
    while (id_stall) begin
      @(negedge clk); #1;
      acc_stalls++;
    end
    acc_secure = id_secure; acc_lane = id_lane; acc_exc = exc_valid; acc_cause = exc_cause;
    @(posedge clk);
    #1 id_valid = 0;
  endtask

  task automatic expect_exc(input word_t ins, input exc_cause_e c, input string what);
    issue(ins);
    check(acc_exc && acc_cause == c, $sformatf("%s: exc=%0d cause=%0d", what, acc_exc, acc_cause));
    @(negedge clk);
    check(!secure_mode, {what, ": back to normal mode"});
  endtask

  task automatic wait_idle(output int cyc);
    cyc = 0;
    @(negedge clk);
    while (id_stall || !hash_ready) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    word_t blk [$];
    int cyc, h0;
    for (int r = 0; r < 32; r++) begin tS[r] = 0; tM[r] = 0; tc[r] = 0; tp[r] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // plain instruction: no stall, no hash, no tag
    issue(ADD(3, 1, 2));
    check(acc_stalls == 0 && !acc_secure && !acc_exc && hashed.size() == 0, "plain instruction");

    // ---- load block #1 into x5 ----
    tc[5] = 128'h1111_2222_3333_4444_5555_6666_7777_8888;
    blk = {BEGIN(1), LW(5, 40), LW(5, 44), LW(5, 48), LW(5, 52), END_(1)};
    pipe_drained = 0;
    issue(blk[0]);
    @(negedge clk);
    check(secure_mode, "Begin enters secure mode");
    for (int i = 1; i <= 4; i++) begin
      issue(blk[i]);
      check(acc_secure && acc_lane == 2'(i-1) && !acc_exc, $sformatf("load lane tag %0d", i-1));
    end
    issue(blk[5]);
    check(!acc_exc, "End accepted");
    // hash verified, but loads not written back: decode must stay stalled
    repeat (20) @(negedge clk);
    check(id_stall && n_dec_req == 0, "stalls until loads are written back");
    repeat (4) begin @(negedge clk); wb_secure_load = 1; @(negedge clk); wb_secure_load = 0; end
    repeat (3) @(negedge clk);
    check(n_dec_req == 0, "waits for an empty pipeline");
    pipe_drained = 1;
    wait_idle(cyc);
    check(n_dec_req == 1 && last_crypt_data == tc[5], "decrypt request carries the ciphertext");
    check(n_dec_we == 1 && last_x_addr == 5 && last_x_plain == ~tc[5][31:0], "plaintext written to the shadow register");
    check(!secure_mode, "load block ends in normal mode");
    check(hashed.size() == 6, $sformatf("six words hashed (%0d)", hashed.size()));
    for (int i = 0; i < 6 && i < hashed.size(); i++)
      check(hashed[i] == blk[i] && first_flags[i] == (i == 0), $sformatf("hash word %0d", i));

    // ---- store block #2 of modified sensitive x1 ----
    tS[1] = 1; tM[1] = 1; tp[1] = 32'hcafe_f00d;
    h0 = hashed.size();
    pipe_drained = 0;
    issue(BEGIN(2));
    fork
      issue(SW(1, 60));
      begin repeat (6) @(negedge clk); pipe_drained = 1; end
    join
    check(acc_stalls >= 5, $sformatf("first store waits for drain and encryption (%0d)", acc_stalls));
    check(n_crypt == 2 && !last_dec && last_crypt_data == {96'h0, 32'hcafe_f00d}, "encrypt request carries the zero-extended plaintext");
    check(n_enc_we == 1 && last_x_addr == 1 && last_x_cipher == ({96'h0, 32'hcafe_f00d} ^ ENC_MASK), "ciphertext written back");
    check(acc_secure && acc_lane == 0, "store lane 0 tag");
    for (int i = 1; i < 4; i++) begin
      issue(SW(1, 60 + 4*i));
      check(acc_secure && acc_lane == 2'(i) && acc_stalls < 8, $sformatf("store lane %0d", i));
    end
    issue(END_(2));
    wait_idle(cyc);
    check(!secure_mode && hashed.size() == h0 + 6, "store block done");

    // ---- store block #3 of unmodified sensitive x5: no encryption ----
    tS[5] = 1; tM[5] = 0;
    issue(BEGIN(3));
    for (int i = 0; i < 4; i++) issue(SW(5, 40 + 4*i));
    issue(END_(3));
    wait_idle(cyc);
    check(n_crypt == 2 && n_enc_we == 1, "unmodified register stored without re-encryption");

    // ---- exceptions ----
    expect_exc(BEGIN(9), EXC_BAD_SERIAL, "unregistered serial");
    expect_exc(END_(1), EXC_END_NO_BEGIN, "End without Begin");
    expect_exc(SW(5, 0), EXC_SENS_NORMAL, "sensitive store in normal mode");
    issue(BEGIN(0));
    expect_exc(BEGIN(1), EXC_NESTED_BEGIN, "nested Begin");
    issue(BEGIN(0)); issue(LW(6, 0));
    expect_exc(LW(7, 4), EXC_MIXED, "two registers in one block");
    issue(BEGIN(0)); issue(LW(6, 0));
    expect_exc(SW(6, 4), EXC_MIXED, "load and store mixed");
    issue(BEGIN(0));
    expect_exc(ADD(1, 2, 3), EXC_MIXED, "other instruction in a block");
    issue(BEGIN(0)); for (int i = 0; i < 3; i++) issue(LW(6, 4*i));
    expect_exc(END_(0), EXC_COUNT, "three loads");
    issue(BEGIN(0)); for (int i = 0; i < 4; i++) issue(LW(6, 4*i));
    expect_exc(LW(6, 16), EXC_COUNT, "five loads");
    issue(BEGIN(0)); for (int i = 0; i < 4; i++) issue(LW(6, 4*i));
    expect_exc(END_(1), EXC_SERIAL_MISMATCH, "End serial differs");
    // hash mismatch raises an exception after End
    next_ok = 0;
    issue(BEGIN(0)); for (int i = 0; i < 4; i++) issue(LW(6, 4*i));
    issue(END_(0));
    cyc = 0;
    while (!exc_valid && cyc < 100) begin @(posedge clk); #1 cyc++; end
    check(exc_valid && exc_cause == EXC_HASH, "hash mismatch exception");
    @(posedge clk); #1;
    check(!secure_mode && !id_stall, "released after hash failure");
    check(n_dec_req == 1, "no decryption after a hash failure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
