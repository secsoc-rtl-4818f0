// tb_secsoc_random: randomised end-to-end test of the SecSoC security
// hardware at its default parameters. The same behavioural in-order core as
// in tb_secsoc_chip runs a random program over four sensitive variables held
// encrypted in memory (one register each, x5..x8) and four plain registers
// (x20..x23): load blocks, store blocks, additions of plain values or
// constants into sensitive registers, sensitive-to-sensitive additions and
// plain register updates. A value model tracks every register and variable;
// registers are compared through the operand ports after each step, and at
// the end every variable is stored and decrypted from memory with the
// reference AES. Store blocks with and without re-encryption must both
// occur, and no exception may be raised.
module tb_secsoc_random;
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
    repeat (400000) @(posedge clk);
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


  localparam int X10 = 32'h400;   // fits the 12-bit ADDI immediate
  localparam int NV  = 4;

  initial begin
    word_t lb [NV][], sb [NV][];
    word_t mv [32];
    word_t memv [NV];
    logic [127:0] pt;
    int op, i, j, imm, n_ops, tot_exc;
    for (int k = 0; k < 16; k++) n_exc[k] = 0;
    for (int s = 0; s < 3; s++) pipe[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    @(negedge clk); cfg_erase = 1; @(negedge clk); cfg_erase = 0;
    for (int k = 0; k < 4; k++) cfg(16'(k), KEY[127 - 32*k -: 32]);
    for (int e = 0; e < 64; e++) cfg({2'b10, 14'(e)}, 32'd0);
    for (int v = 0; v < NV; v++) begin
      block_words(v,      1, 5 + v, 16*v, 10, lb[v]);
      block_words(8 + v,  0, 5 + v, 16*v, 10, sb[v]);
      provision(v, lb[v]);
      provision(8 + v, sb[v]);
    end
    @(negedge clk); cfg_lock = 1; @(negedge clk); cfg_lock = 0;

    for (int v = 0; v < NV; v++) begin
      memv[v] = $urandom;
      pt = {96'h0, memv[v]};
      pt = aes_ref_pkg::encrypt(KEY, pt);
      for (int k = 0; k < 4; k++) mem[X10 + 16*v + 4*k] = pt[127 - 32*k -: 32];
    end
    for (int r = 0; r < 32; r++) mv[r] = 0;
    issue(ADDI(10, 0, X10));
    mv[10] = X10;
    for (int r = 5; r < 9; r++) issue(ADDI(r, 0, 0));
    for (int r = 20; r < 24; r++) begin
      imm = $urandom_range(0, 2047);
      issue(ADDI(r, 0, imm));
      mv[r] = 32'(imm);
    end

    n_ops = 150;
    for (int n = 0; n < n_ops; n++) begin
      op = $urandom_range(0, 5);
      i = $urandom_range(0, NV - 1);
      j = $urandom_range(0, 3);
      imm = $urandom_range(0, 2047) - 1024;
      unique case (op)
        0: begin run_block(lb[i]); mv[5 + i] = memv[i]; n_dec++; end
        1: begin run_block(sb[i]); memv[i] = mv[5 + i]; end
        2: begin issue(ADD(5 + i, 5 + i, 20 + j)); mv[5 + i] += mv[20 + j]; end
        3: begin issue(ADDI(5 + i, 5 + i, imm)); mv[5 + i] += 32'(imm); end
        4: begin issue(ADD(5 + i, 5 + i, 5 + j)); mv[5 + i] += mv[5 + j]; end
        default: begin issue(ADDI(20 + j, 20 + j, imm)); mv[20 + j] += 32'(imm); end
      endcase
      drain();
      for (int r = 5; r < 9; r++) begin
        id_instr = ADD(0, r, 20 + (r - 5)); #1;
        if (r == 5 + i && op == 0)
          check(rs1_sens, $sformatf("step %0d: x%0d sensitive after its load block", n, r));
        check(rs1_data == mv[r], $sformatf("step %0d op %0d: x%0d = %h, model %h", n, op, r, rs1_data, mv[r]));
        check(rs2_data == mv[20 + (r - 5)], $sformatf("step %0d: x%0d", n, 20 + (r - 5)));
      end
      id_instr = 0;
    end
    for (int v = 0; v < NV; v++) begin run_block(sb[v]); memv[v] = mv[5 + v]; end
    drain();
    for (int v = 0; v < NV; v++) begin
      pt = aes_ref_pkg::decrypt(KEY, mem_blk(X10 + 16*v));
      check(pt == {96'h0, memv[v]}, $sformatf("variable %0d in memory decrypts to %h, model %h", v, pt, memv[v]));
    end
    tot_exc = 0;
    for (int k = 0; k < 16; k++) tot_exc += n_exc[k];
    $display("decrypts=%0d encrypts=%0d skipped=%0d stall_cycles=%0d taint=%0d cycles=%0d",
             n_dec, n_enc, n_skip, n_stall, n_taint, cycle);
    check(tot_exc == 0, $sformatf("no exception in a genuine program (%0d)", tot_exc));
    check(n_enc > 0 && n_skip > 0 && n_dec > 0, "encryption, skipped encryption and decryption all occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
