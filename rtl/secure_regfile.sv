// secure_regfile: RISC-V general purpose register file (GPRF) with the
// security extensions of the compute core.
//
// Per register r:
//   gprf[r]  32-bit architectural register; for a sensitive register it holds
//            lane 0 of the encrypted 128-bit value
//   erf[r]   extended register file: lanes 1..3 of the encrypted value
//   srf[r]   shadow register file: the decrypted (plaintext) value
//   S[r]     security bit: r holds a sensitive variable
//   M[r]     modified bit: the plaintext changed since the ciphertext was made
// A read of a register with S set returns srf, otherwise gprf; srf is never
// visible any other way. The encrypted value is {gprf, erf} with lane 0 (the
// word at the lowest address) in bits [127:96].
//
// Write-back port (from the pipeline's write-back stage):
//   wb_load && wb_secure  lane wb_lane of an encrypted value; S set, M cleared
//   wb_load && !wb_secure plain load into gprf; S cleared
//   !wb_load && wb_sens   result computed from a sensitive source: srf, S and
//                         M set (it must be re-encrypted before it is stored)
//   !wb_load && !wb_sens  plain result into gprf; S cleared
// SMU write port (from the security controller):
//   dec_we  decrypted plaintext into srf, S set, M cleared
//   enc_we  fresh ciphertext into gprf/erf and its plaintext into srf, S set,
//           M cleared
// Store port: the data a store sends to memory. In a sensitive block it is
// lane st_lane of the ciphertext; outside one it is gprf, or zero when the
// register is sensitive (that store also raises an exception in decode).
// x0 reads as zero and ignores writes. Reads are combinational, writes
// happen at the clock edge; S and M are reset to zero.
// The register contents of GPRF/ERF/SRF/S/M and the load behaviour follow the
// design; taint propagation through wb_sens (so that a value computed from a
// sensitive variable becomes sensitive) and the lane layout are this
// design's choice.
module secure_regfile
  import secsoc_pkg::*;
#(
  parameter int unsigned NR = NREGS,
  parameter int unsigned NL = LANES
) (
  input  logic     clk,
  input  logic     rst_n,
  // operand read ports
  input  reg_idx_t rs1_addr,
  input  reg_idx_t rs2_addr,
  output word_t    rs1_data,
  output word_t    rs2_data,
  output logic     rs1_sens,
  output logic     rs2_sens,
  // write-back port
  input  logic     wb_we,
  input  reg_idx_t wb_addr,
  input  word_t    wb_data,
  input  logic     wb_load,
  input  logic     wb_secure,
  input  logic [$clog2(NL)-1:0] wb_lane,
  input  logic     wb_sens,
  // store data port
  input  reg_idx_t st_addr,
  input  logic     st_secure,
  input  logic [$clog2(NL)-1:0] st_lane,
  output word_t    st_data,
  // security controller port
  input  reg_idx_t q_addr,
  output logic     q_sens,
  output logic     q_mod,
  output logic [NL*XLEN-1:0] q_cipher,
  output word_t    q_plain,
  input  logic     dec_we,
  input  logic     enc_we,
  input  word_t    x_plain,
  input  logic [NL*XLEN-1:0] x_cipher
);

  word_t                     gprf [NR];
  logic [(NL-1)*XLEN-1:0]    erf  [NR];
  word_t                     srf  [NR];
  logic [NR-1:0]             s_q, m_q;

  function automatic word_t rd(input reg_idx_t a);
    if (a == '0) return '0;
    return s_q[a] ? srf[a] : gprf[a];
  endfunction

  function automatic logic [NL*XLEN-1:0] cipher_of(input reg_idx_t a);
    return {gprf[a], erf[a]};
  endfunction

  assign rs1_data = rd(rs1_addr);
  assign rs2_data = rd(rs2_addr);
  assign rs1_sens = s_q[rs1_addr];
  assign rs2_sens = s_q[rs2_addr];

  assign q_sens   = s_q[q_addr];
  assign q_mod    = m_q[q_addr];
  assign q_cipher = cipher_of(q_addr);
  assign q_plain  = rd(q_addr);

  always_comb begin
    logic [NL*XLEN-1:0] c;
    c = cipher_of(st_addr);
    if (st_addr == '0)     st_data = '0;
    else if (st_secure)    st_data = c[NL*XLEN-1 - XLEN*st_lane -: XLEN];
    else if (s_q[st_addr]) st_data = '0;
    else                   st_data = gprf[st_addr];
  end

  wire wb_ok = wb_we && wb_addr != '0;
  wire x_ok  = (dec_we || enc_we) && q_addr != '0;

  // data arrays: no reset, every register is written before it is read
  always_ff @(posedge clk) begin
    if (wb_ok) begin
      if (wb_load && wb_secure) begin
        if (wb_lane == '0) gprf[wb_addr] <= wb_data;
        else erf[wb_addr][(NL-1)*XLEN-1 - XLEN*(int'(wb_lane)-1) -: XLEN] <= wb_data;
      end else if (!wb_load && wb_sens) begin
        srf[wb_addr] <= wb_data;
      end else begin
        gprf[wb_addr] <= wb_data;
      end
    end
    if (x_ok) begin
      srf[q_addr] <= x_plain;
      if (enc_we) {gprf[q_addr], erf[q_addr]} <= x_cipher;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      m_q <= '0;
    end else begin
      if (wb_ok) begin
        if (wb_load) begin
          s_q[wb_addr] <= wb_secure;
          m_q[wb_addr] <= 1'b0;
        end else begin
          s_q[wb_addr] <= wb_sens;
          m_q[wb_addr] <= wb_sens;
        end
      end
      if (x_ok) begin
        s_q[q_addr] <= 1'b1;
        m_q[q_addr] <= 1'b0;
      end
    end
  end

  // the controller never writes the SMU result while the pipeline writes the same register
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(wb_ok && x_ok && wb_addr == q_addr));
  a_one_x: assert property (@(posedge clk) disable iff (!rst_n) !(dec_we && enc_we));

endmodule
