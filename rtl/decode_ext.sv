// decode_ext: security extension of the compute core's decode stage, with the
// control logic that moves sensitive values between the register file and
// the SMU.
//
// It watches every instruction offered to decode. Begin (ADDI x0,x0,serial)
// switches the core to secure mode if the serial number has a reference hash
// in the SMU; End (ADDI x0,x1,serial) closes the block. Inside a block it
// checks that the block holds exactly LANES word loads or LANES word stores
// of one register, and that End carries the serial of its Begin. Every
// instruction of the block (Begin and End included) is forwarded to the SMU
// hash. Any violation raises an exception and drops back to normal mode.
// A word store of a sensitive register outside a block is also an exception.
//
// Load block: each load is tagged (id_secure, id_lane) so the register file
// stores it as lane id_lane of the ciphertext. After End, decode stalls
// while the SMU checks the block hash, until all LANES loads have been
// written back and the pipeline is empty, and while the SMU decrypts the
// ciphertext; the plaintext (bits [31:0] of the decrypted block) goes into
// the shadow register.
// Store block: the first store is held in decode until the pipeline is empty.
// If the register is sensitive and unmodified its stored ciphertext is used
// as it is; otherwise its value, zero-extended to 128 bits, is encrypted by
// the SMU and the ciphertext written to GPRF/ERF before the stores proceed.
// After End, decode stalls until the hash is verified.
//
// Interface: id_stall holds the instruction in decode; an instruction is
// accepted in a cycle with id_valid && !id_stall, and the id_secure/id_lane
// tags and exc_valid/exc_cause belong to that instruction. exc_valid also
// pulses, with no instruction, when a block hash fails after End.
// The checks, the stalls and the forwarding to the SMU follow the design;
// how a serial number is judged correct (it must have a stored hash), the
// single-register rule, and the drain-then-encrypt order are this design's
// choices.
module decode_ext
  import secsoc_pkg::*;
#(
  parameter int unsigned NL = LANES
) (
  input  logic      clk,
  input  logic      rst_n,
  // decode stage
  input  logic      id_valid,
  input  word_t     id_instr,
  output logic      id_stall,
  output logic      id_secure,
  output logic [$clog2(NL)-1:0] id_lane,
  output logic      secure_mode,
  output logic      exc_valid,
  output exc_cause_e exc_cause,
  // pipeline status
  input  logic      pipe_drained,
  input  logic      wb_secure_load,
  // register file controller port
  output reg_idx_t  q_addr,
  input  logic      q_sens,
  input  logic      q_mod,
  input  logic [NL*XLEN-1:0] q_cipher,
  input  word_t     q_plain,
  output logic      dec_we,
  output logic      enc_we,
  output word_t     x_plain,
  output logic [NL*XLEN-1:0] x_cipher,
  // SMU
  output logic [SERIAL_W-1:0] ser_query,
  input  logic      ser_registered,
  output logic      hash_valid,
  output logic      hash_first,
  output word_t     hash_word,
  input  logic      hash_ready,
  output logic      fin_valid,
  output logic [SERIAL_W-1:0] fin_serial,
  input  logic      fin_ready,
  input  logic      verify_done,
  input  logic      verify_ok,
  output logic      crypt_valid,
  output logic      crypt_decrypt,
  output logic [NL*XLEN-1:0] crypt_data,
  input  logic      crypt_ready,
  input  logic      crypt_done,
  input  logic [NL*XLEN-1:0] crypt_result
);

  localparam int unsigned CW = $clog2(NL + 1);

  typedef enum logic [3:0] {
    C_RUN, C_FIN_REQ, C_FIN_WAIT, C_LD_WAIT, C_DEC_REQ, C_DEC_WAIT,
    C_ENC_DRAIN, C_ENC_REQ, C_ENC_WAIT
  } ctl_e;

  typedef enum logic [1:0] {BT_NONE, BT_LOAD, BT_STORE} btype_e;

  ctl_e                ctl_q;
  logic                secure_q;
  logic [SERIAL_W-1:0] serial_q;
  logic [CW-1:0]       cnt_q;      // loads/stores accepted in the block
  logic [CW-1:0]       lanes_q;    // secure loads written back
  btype_e              btype_q;
  reg_idx_t            breg_q;
  logic                enc_done_q;

  // instruction classes
  logic     i_begin, i_end, i_lw, i_sw;
  reg_idx_t i_reg;
  assign i_begin = is_begin(id_instr);
  assign i_end   = is_end(id_instr);
  assign i_lw    = is_lw(id_instr);
  assign i_sw    = is_sw(id_instr);
  assign i_reg   = i_lw ? rd_of(id_instr) : rs2_of(id_instr);

  // decisions on the instruction in decode (meaningful only in C_RUN)
  exc_cause_e d_exc;
  logic       d_hash;      // instruction belongs to a block: hash it
  logic       d_lane;      // in-block load or store
  logic       d_enc;       // first store of a store block: prepare ciphertext
  always_comb begin
    d_exc  = EXC_NONE;
    d_hash = 1'b0;
    d_lane = 1'b0;
    d_enc  = 1'b0;
    if (!secure_q) begin
      if (i_begin) begin
        if (!ser_registered) d_exc = EXC_BAD_SERIAL;
        else                 d_hash = 1'b1;
      end else if (i_end) begin
        d_exc = EXC_END_NO_BEGIN;
      end else if (i_sw && q_sens && rs2_of(id_instr) != '0) begin
        d_exc = EXC_SENS_NORMAL;
      end
    end else begin
      if (i_begin) begin
        d_exc = EXC_NESTED_BEGIN;
      end else if (i_end) begin
        if (serial_of(id_instr) != serial_q) d_exc = EXC_SERIAL_MISMATCH;
        else if (cnt_q != CW'(NL))           d_exc = EXC_COUNT;
        else                                 d_hash = 1'b1;
      end else if (i_lw || i_sw) begin
        if (i_reg == '0 ||
            (btype_q == BT_LOAD && i_sw) || (btype_q == BT_STORE && i_lw) ||
            (btype_q != BT_NONE && i_reg != breg_q))
          d_exc = EXC_MIXED;
        else if (cnt_q == CW'(NL))
          d_exc = EXC_COUNT;
        else if (i_sw && cnt_q == '0 && !enc_done_q)
          d_enc = 1'b1;
        else begin
          d_hash = 1'b1;
          d_lane = 1'b1;
        end
      end else begin
        d_exc = EXC_MIXED;
      end
    end
  end

  wire in_run = (ctl_q == C_RUN);
  wire d_ok   = id_valid && in_run && d_exc == EXC_NONE;
  wire accept = id_valid && !id_stall;

  always_comb begin
    id_stall = !in_run || (id_valid && d_exc == EXC_NONE && (d_enc || (d_hash && !hash_ready)));
  end

  assign id_secure   = d_lane;
  assign id_lane     = cnt_q[$clog2(NL)-1:0];
  assign secure_mode = secure_q;

  assign ser_query  = serial_of(id_instr);
  assign hash_valid = d_ok && d_hash;
  assign hash_first = i_begin;
  assign hash_word  = id_instr;

  assign fin_valid  = (ctl_q == C_FIN_REQ);
  assign fin_serial = serial_q;

  assign crypt_valid   = (ctl_q == C_DEC_REQ) || (ctl_q == C_ENC_REQ);
  assign crypt_decrypt = (ctl_q == C_DEC_REQ);
  assign crypt_data    = (ctl_q == C_DEC_REQ) ? q_cipher : {{(NL-1)*XLEN{1'b0}}, q_plain};

  assign q_addr   = in_run ? rs2_of(id_instr) : breg_q;
  assign dec_we   = (ctl_q == C_DEC_WAIT) && crypt_done;
  assign enc_we   = (ctl_q == C_ENC_WAIT) && crypt_done;
  assign x_plain  = dec_we ? crypt_result[XLEN-1:0] : q_plain;
  assign x_cipher = crypt_result;

  wire hash_fail = (ctl_q == C_FIN_WAIT) && verify_done && !verify_ok;
  assign exc_valid = (accept && d_exc != EXC_NONE) || hash_fail;
  assign exc_cause = hash_fail ? EXC_HASH : (exc_valid ? d_exc : EXC_NONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl_q      <= C_RUN;
      secure_q   <= 1'b0;
      serial_q   <= '0;
      cnt_q      <= '0;
      lanes_q    <= '0;
      btype_q    <= BT_NONE;
      breg_q     <= '0;
      enc_done_q <= 1'b0;
    end else begin
      if (wb_secure_load && lanes_q != CW'(NL)) lanes_q <= lanes_q + CW'(1);
      unique case (ctl_q)
        C_RUN: begin
          if (id_valid && d_enc && d_exc == EXC_NONE) begin
            breg_q <= i_reg;
            ctl_q  <= C_ENC_DRAIN;
          end else if (accept) begin
            if (d_exc != EXC_NONE) begin
              secure_q <= 1'b0;
            end else if (!secure_q && i_begin) begin
              secure_q   <= 1'b1;
              serial_q   <= serial_of(id_instr);
              cnt_q      <= '0;
              lanes_q    <= '0;
              btype_q    <= BT_NONE;
              enc_done_q <= 1'b0;
            end else if (secure_q && i_end) begin
              ctl_q <= C_FIN_REQ;
            end else if (d_lane) begin
              cnt_q   <= cnt_q + CW'(1);
              btype_q <= i_lw ? BT_LOAD : BT_STORE;
              breg_q  <= i_reg;
            end
          end
        end
        C_FIN_REQ:  if (fin_ready) ctl_q <= C_FIN_WAIT;
        C_FIN_WAIT: if (verify_done) begin
          if (!verify_ok || btype_q != BT_LOAD) begin
            secure_q <= 1'b0;
            ctl_q    <= C_RUN;
          end else begin
            ctl_q <= C_LD_WAIT;
          end
        end
        C_LD_WAIT:  if (lanes_q == CW'(NL) && pipe_drained) ctl_q <= C_DEC_REQ;
        C_DEC_REQ:  if (crypt_ready) ctl_q <= C_DEC_WAIT;
        C_DEC_WAIT: if (crypt_done) begin
          secure_q <= 1'b0;
          ctl_q    <= C_RUN;
        end
        C_ENC_DRAIN: if (pipe_drained) begin
          if (q_sens && !q_mod) begin
            enc_done_q <= 1'b1;
            ctl_q      <= C_RUN;
          end else begin
            ctl_q <= C_ENC_REQ;
          end
        end
        C_ENC_REQ:  if (crypt_ready) ctl_q <= C_ENC_WAIT;
        C_ENC_WAIT: if (crypt_done) begin
          enc_done_q <= 1'b1;
          ctl_q      <= C_RUN;
        end
        default: ctl_q <= C_RUN;
      endcase
    end
  end

  // requests to the SMU are held until taken
  a_crypt_hold: assert property (@(posedge clk) disable iff (!rst_n)
    crypt_valid && !crypt_ready |=> crypt_valid);
  a_fin_hold: assert property (@(posedge clk) disable iff (!rst_n)
    fin_valid && !fin_ready |=> fin_valid);
  // in-block accepted loads/stores never exceed the block size
  a_count: assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= CW'(NL));

endmodule
