// tb_secsoc_chip: end-to-end test of the SecSoC security hardware at its
// default parameters. A small behavioural in-order core (decode, then three
// stages to write-back, with an interlock on register hazards) runs a
// program through the chip and a word memory:
//   b (sensitive) is loaded encrypted in block 0 and decrypted into the
//   shadow register; c is loaded in plain; a = b + c becomes sensitive and
//   is encrypted and stored in block 1; b++ is re-encrypted and stored in
//   block 2; that value is loaded again into x7 (block 3) and stored, still
//   unmodified, in block 4 without re-encryption.
// Memory contents are checked by decrypting them with the reference AES;
// block hashes are computed with the reference CBC-MAC and provisioned
// through the configuration port before the store is locked. The test then
// provokes every exception cause (plaintext store of a sensitive register,
// unregistered serial, short block, tampered block, End without Begin,
// nested Begin, mixed loads and stores, mismatched End serial) and checks
// that each raises its exception once and that nothing was decrypted. Every
// mechanism (secure mode, stall, decryption, encryption, skipped
// re-encryption, taint, each exception) is counted and must occur.
module tb_secsoc_chip;
  import secsoc_pkg::*;
  import aes_ref_pkg::*;

  localparam logic [127:0] MK  = 128'h5ec5_0c00_1234_5678_9abc_def0_0fed_cba9;
  localparam logic [127:0] KEY = 128'h2b7e_1516_28ae_d2a6_abf7_1588_09cf_4f3c;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_lock = 0, cfg_erase = 0, cfg_locked;
  logic [15:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  logic id_valid = 0, id_stall, id_secure, secure_mode, exc_valid;
  word_t id_instr = 0;
  logic [1:0] id_lane;
  exc_cause_e exc_cause;
  reg_idx_t rs1_addr, rs2_addr, wb_addr, st_addr;
  word_t rs1_data, rs2_data, wb_data, st_data;
  logic rs1_sens, rs2_sens, wb_we, wb_load, wb_secure, wb_sens, st_secure, pipe_drained;
  logic [1:0] wb_lane, st_lane;
  int checks = 0, failures = 0;

  secsoc_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- behavioural core ----------------
  typedef struct packed {
    logic     v, wen, load, store, secure, sens;
    logic [1:0] lane;
    reg_idx_t rd, rs2;
    word_t    data, addr;
  } op_t;

  op_t   pipe [3];
  word_t mem [int];
  int    n_exc [16];
  int    n_stall = 0, n_dec = 0, n_enc = 0, n_skip = 0, last_stalls = 0, n_secure = 0, n_taint = 0, n_srf_read = 0;
  int    cycle = 0;

  assign rs1_addr = id_instr[19:15];
  assign rs2_addr = id_instr[24:20];
  assign wb_we     = pipe[2].v && pipe[2].wen;
  assign wb_addr   = pipe[2].rd;
  assign wb_data   = pipe[2].data;
  assign wb_load   = pipe[2].load;
  assign wb_secure = pipe[2].secure;
  assign wb_lane   = pipe[2].lane;
  assign wb_sens   = pipe[2].sens;
  assign st_addr   = pipe[2].rs2;
  assign st_secure = pipe[2].secure;
  assign st_lane   = pipe[2].lane;
  assign pipe_drained = !pipe[0].v && !pipe[1].v && !pipe[2].v;

  function automatic word_t simm(input word_t i);
    return {{20{i[31]}}, i[31:20]};
  endfunction
  function automatic word_t stimm(input word_t i);
    return {{20{i[31]}}, i[31:25], i[11:7]};
  endfunction

  // execute the instruction accepted at this edge (operands as seen before the edge)
  function automatic op_t execute(input word_t i);
    op_t o;
    o = '0;
    o.v = 1'b1;
    o.rd = i[11:7];
    o.rs2 = i[24:20];
    o.secure = id_secure;
    o.lane = id_lane;
    unique case (i[6:0])
      7'b0010011: begin  // ADDI / ANDI
        o.wen = 1'b1;
        o.data = (i[14:12] == 3'b111) ? (rs1_data & simm(i)) : (rs1_data + simm(i));
        o.sens = rs1_sens;
      end
      7'b0110011: begin  // ADD
        o.wen = 1'b1;
        o.data = rs1_data + rs2_data;
        o.sens = rs1_sens || rs2_sens;
      end
      7'b0000011: begin  // LW
        o.wen = 1'b1;
        o.load = 1'b1;
        o.addr = rs1_data + simm(i);
        o.data = mem.exists(int'(o.addr)) ? mem[int'(o.addr)] : 32'h0;
      end
      7'b0100011: begin  // SW
        o.store = 1'b1;
        o.addr = rs1_data + stimm(i);
      end
      default: o.v = 1'b0;
    endcase
    if (o.wen && o.rd == '0) o.wen = 1'b0;
    return o;
  endfunction

  always @(posedge clk) begin
    cycle++;
    if (id_valid && id_stall) n_stall++;
    if (pipe[2].v && pipe[2].store) mem[int'(pipe[2].addr)] = st_data;
    pipe[2] <= pipe[1];
    pipe[1] <= pipe[0];
    if (id_valid && !id_stall) begin
      if (exc_valid) begin
        n_exc[exc_cause]++;
        pipe[0] <= '0;          // trapped instruction is squashed
      end else begin
        pipe[0] <= execute(id_instr);
        if (id_instr[6:0] == 7'b0110011 && (rs1_sens || rs2_sens)) n_taint++;
        if (id_instr[6:0] == 7'b0110011 && rs1_sens) n_srf_read++;
      end
    end else begin
      pipe[0] <= '0;
    end
    if (exc_valid && exc_cause == EXC_HASH) n_exc[EXC_HASH]++;
  end

  function automatic logic hazard(input word_t i);
    for (int s = 0; s < 3; s++)
      if (pipe[s].v && pipe[s].wen && (pipe[s].rd == i[19:15] || pipe[s].rd == i[24:20])) return 1;
    return 0;
  endfunction

  task automatic issue(input word_t ins);
    @(negedge clk);
    while (hazard(ins)) @(negedge clk);
    id_valid = 1; id_instr = ins;
    last_stalls = 0;
    #1;
    while (id_stall) begin @(negedge clk); #1; last_stalls++; end
    if (secure_mode || is_begin(ins)) n_secure++;
    @(posedge clk);
    #1 id_valid = 0;
  endtask

  task automatic drain();
    @(negedge clk);
    while (!pipe_drained || id_stall) @(negedge clk);
    @(negedge clk);
  endtask

  // ---------------- encodings ----------------
  function automatic word_t BEGIN(input int s); return {12'(s), 5'd0, 3'b000, 5'd0, 7'b0010011}; endfunction
  function automatic word_t END_(input int s);  return {12'(s), 5'd1, 3'b000, 5'd0, 7'b0010011}; endfunction
  function automatic word_t ADDI(input int rd, input int rs, input int imm);
    return {12'(imm), 5'(rs), 3'b000, 5'(rd), 7'b0010011};
  endfunction
  function automatic word_t ADD(input int rd, input int a, input int b);
    return {7'd0, 5'(b), 5'(a), 3'b000, 5'(rd), 7'b0110011};
  endfunction
  function automatic word_t LW(input int rd, input int off, input int base);
    return {12'(off), 5'(base), 3'b010, 5'(rd), 7'b0000011};
  endfunction
  function automatic word_t SW(input int rs2, input int off, input int base);
    logic [11:0] o; o = 12'(off);
    return {o[11:5], 5'(rs2), 5'(base), 3'b010, o[4:0], 7'b0100011};
  endfunction

  function automatic void block_words(input int serial, input logic load, input int reg_n,
                                      input int off, input int base, output word_t w []);
    w = new[6];
    w[0] = BEGIN(serial);
    for (int i = 0; i < 4; i++)
      w[1+i] = load ? LW(reg_n, off + 4*i, base) : SW(reg_n, off + 4*i, base);
    w[5] = END_(serial);
  endfunction

  // A decryption (21 cycles) shows as a long stall of the instruction after a
  // load block; an encryption (11 cycles) as a long stall of the first store.
  task automatic after_load();
    if (last_stalls >= 21) n_dec++;
  endtask

  task automatic run_block(input word_t w []);
    for (int i = 0; i < w.size(); i++) begin
      issue(w[i]);
      if (i == 0) after_load();
      if (i == 1 && w[1][6:0] == 7'b0100011) begin
        if (last_stalls >= 11) n_enc++;
        else n_skip++;
      end
    end
  endtask

  task automatic cfg(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic provision(input int e, input word_t w []);
    logic [127:0] h;
    h = block_mac(MK, w, w.size());
    for (int k = 0; k < 4; k++) cfg({2'b01, 12'(e), 2'(k)}, h[127 - 32*k -: 32]);
    cfg({2'b10, 14'(e)}, 32'd1);
  endtask

  function automatic logic [127:0] mem_blk(input int addr);
    return {mem[addr], mem[addr+4], mem[addr+8], mem[addr+12]};
  endfunction

  localparam int X10 = 32'h100, X11 = 32'h200, X12 = 32'h300;

  initial begin
    word_t b0 [], b1 [], b2 [], b3 [], b4 [], b5 [], b5run [], b6 [];
    logic [127:0] ct_b, pt;
    int t0, lat;
    for (int i = 0; i < 16; i++) n_exc[i] = 0;
    for (int s = 0; s < 3; s++) pipe[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // -------- configuration time --------
    @(negedge clk); cfg_erase = 1; @(negedge clk); cfg_erase = 0;
    for (int k = 0; k < 4; k++) cfg(16'(k), KEY[127 - 32*k -: 32]);
    for (int e = 0; e < 64; e++) cfg({2'b10, 14'(e)}, 32'd0);
    block_words(0, 1, 5, 40, 10, b0);   // load b into x5
    block_words(1, 0, 1, 60, 11, b1);   // store a from x1
    block_words(2, 0, 5, 40, 10, b2);   // store b from x5
    block_words(3, 1, 7, 40, 10, b3);   // load b (now b+1) again into x7
    block_words(4, 0, 7, 0, 12, b4);    // store x7 unmodified
    block_words(5, 1, 8, 40, 10, b5);   // registered block ...
    block_words(5, 1, 8, 80, 10, b5run);//   ... and a tampered copy of it
    block_words(6, 1, 9, 40, 10, b6);
    provision(0, b0); provision(1, b1); provision(2, b2); provision(3, b3);
    provision(4, b4); provision(5, b5); provision(6, b6);
    @(negedge clk); cfg_lock = 1; @(negedge clk); cfg_lock = 0;
    check(cfg_locked, "store locked after provisioning");
    cfg(16'd0, 32'hdead_beef);          // ignored: locked

    // memory image: b = 10 encrypted, c = 7 in plain
    ct_b = aes_ref_pkg::encrypt(KEY, 128'd10);
    for (int k = 0; k < 4; k++) mem[X10 + 40 + 4*k] = ct_b[127 - 32*k -: 32];
    mem[X10 + 100] = 32'd7;
    for (int k = 0; k < 4; k++) mem[X10 + 80 + 4*k] = ct_b[127 - 32*k -: 32];

    // -------- the program --------
    issue(ADDI(10, 0, X10));
    issue(ADDI(11, 0, X11));
    issue(ADDI(12, 0, X12));
    t0 = cycle;
    run_block(b0);                       // load b, decrypt into SRF
    issue(LW(6, 100, 10));               // c, not sensitive
    after_load();
    issue(ADD(1, 5, 6));                 // a = b + c, sensitive by derivation
    lat = cycle - t0;
    $display("load block + two instructions: %0d cycles", lat);
    run_block(b1);                       // encrypt a and store it
    issue(ADDI(5, 5, 1));                // b++
    run_block(b2);                       // re-encrypt b and store it
    run_block(b3);                       // x7 <- b+1 (ciphertext kept)
    run_block(b4);                       // store x7 without re-encryption
    drain();
    check(!secure_mode, "normal mode after the program");

    pt = aes_ref_pkg::decrypt(KEY, mem_blk(X11 + 60));
    check(pt == 128'd17, $sformatf("a = b + c stored encrypted (%h)", pt));
    pt = aes_ref_pkg::decrypt(KEY, mem_blk(X10 + 40));
    check(pt == 128'd11, $sformatf("b++ stored encrypted (%h)", pt));
    check(mem_blk(X12) == mem_blk(X10 + 40), "unmodified sensitive register stored as its ciphertext");
    check(mem[X11 + 60] != 32'd17 && mem[X11 + 72] != 32'd17, "no plaintext of a in memory");
    // register view: x1 reads its plaintext, x7 the original b
    @(negedge clk); id_instr = ADD(0, 1, 7); #1;
    check(rs1_data == 32'd17 && rs1_sens, "x1 holds plaintext a in the shadow register");
    check(rs2_data == 32'd11 && rs2_sens, "x7 holds plaintext b++ in the shadow register");
    id_instr = ADD(0, 6, 10); #1;
    check(rs1_data == 32'd7 && !rs1_sens && rs2_data == X10, "plain registers unaffected");

    // -------- attacks --------
    issue(SW(1, 0, 11));                 // plaintext store of a sensitive register
    issue(BEGIN(9));                     // serial with no stored hash
    issue(BEGIN(6));
    for (int i = 0; i < 3; i++) issue(LW(9, 40 + 4*i, 10));
    issue(END_(6));                      // one load short
    run_block(b5run);                    // tampered code: hash mismatch
    issue(END_(0));                      // End with no open block
    issue(BEGIN(0));
    issue(BEGIN(1));                     // Begin inside an open block
    issue(BEGIN(6));
    issue(LW(9, 40, 10));
    issue(SW(9, 44, 10));                // load and store mixed
    issue(BEGIN(6));
    for (int i = 0; i < 4; i++) issue(LW(9, 40 + 4*i, 10));
    issue(END_(5));                      // End serial differs from Begin
    drain();
    check(n_exc[EXC_END_NO_BEGIN] == 1, "exception: End without Begin");
    check(n_exc[EXC_NESTED_BEGIN] == 1, "exception: nested Begin");
    check(n_exc[EXC_MIXED] == 1, "exception: mixed block");
    check(n_exc[EXC_SERIAL_MISMATCH] == 1, "exception: End serial mismatch");
    check(n_exc[EXC_SENS_NORMAL] == 1, "exception: sensitive store in normal mode");
    check(n_exc[EXC_BAD_SERIAL] == 1, "exception: unregistered serial");
    check(n_exc[EXC_COUNT] == 1, "exception: wrong instruction count");
    check(n_exc[EXC_HASH] == 1, "exception: block hash mismatch");
    @(negedge clk); id_instr = ADD(0, 8, 0); #1;
    check(rs1_data != 32'd10, "tampered block was not decrypted");
    check(!secure_mode, "normal mode after the attacks");

    // -------- every mechanism happened --------
    $display("decrypts=%0d encrypts=%0d skipped=%0d stall_cycles=%0d secure_instrs=%0d taint=%0d",
             n_dec, n_enc, n_skip, n_stall, n_secure, n_taint);
    check(n_dec == 2, $sformatf("decryptions %0d (blocks 0 and 3 only)", n_dec));
    check(n_enc == 2, $sformatf("encryptions %0d (blocks 1 and 2)", n_enc));
    check(n_skip == 1, $sformatf("skipped re-encryptions %0d (block 4)", n_skip));
    check(n_stall > 0, "decode stalled");
    check(n_secure > 0, "secure mode entered");
    check(n_taint > 0 && n_srf_read > 0, "sensitivity propagated through the ALU");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
