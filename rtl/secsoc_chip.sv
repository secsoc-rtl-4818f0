// secsoc_chip: the SecSoC chip's security hardware. It joins the compute
// core's security extensions (the decode-stage checks and control of
// decode_ext and the extended register file secure_regfile) with the
// Security Management Unit (smu), which holds the secrets and does all AES
// encryption, decryption and hashing. Plaintext of a sensitive variable
// exists only in the shadow register file; memory only ever sees its
// ciphertext.
//
// The base RISC-V pipeline around these parts is not included: its
// connections are the ports of this module.
//   decode:      id_valid/id_instr in, id_stall out; for an accepted
//                instruction id_secure/id_lane are tags the pipeline carries
//                to write-back or memory, exc_valid/exc_cause a trap request
//   operands:    two read ports, returning the plaintext of sensitive
//                registers and their S bits (rsN_sens)
//   write-back:  wb_* with the tags of the instruction; wb_sens marks a
//                result computed from a sensitive operand
//   store data:  st_addr with the store's tags; st_data goes to the bus
//   pipe_drained: no instruction between decode and write-back
//   cfg_*:       configuration-time programming of the SMU secret store
// The partition into core extensions and SMU follows the architecture;
// bringing the pipeline side out as tagged ports is this design's choice.
// Timing is that of the parts: reads are combinational, writes take effect
// at the clock edge, and decode stalls while the SMU works.
module secsoc_chip
  import secsoc_pkg::*;
#(
  parameter int unsigned  NUM_BLOCKS = 64,
  parameter logic [127:0] MASTER_KEY = 128'h5ec5_0c00_1234_5678_9abc_def0_0fed_cba9
) (
  input  logic        clk,
  input  logic        rst_n,
  // secret store configuration
  input  logic        cfg_we,
  input  logic [15:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  input  logic        cfg_lock,
  input  logic        cfg_erase,
  output logic        cfg_locked,
  // decode stage
  input  logic        id_valid,
  input  word_t       id_instr,
  output logic        id_stall,
  output logic        id_secure,
  output logic [1:0]  id_lane,
  output logic        secure_mode,
  output logic        exc_valid,
  output exc_cause_e  exc_cause,
  // operand reads
  input  reg_idx_t    rs1_addr,
  input  reg_idx_t    rs2_addr,
  output word_t       rs1_data,
  output word_t       rs2_data,
  output logic        rs1_sens,
  output logic        rs2_sens,
  // write-back
  input  logic        wb_we,
  input  reg_idx_t    wb_addr,
  input  word_t       wb_data,
  input  logic        wb_load,
  input  logic        wb_secure,
  input  logic [1:0]  wb_lane,
  input  logic        wb_sens,
  // store data
  input  reg_idx_t    st_addr,
  input  logic        st_secure,
  input  logic [1:0]  st_lane,
  output word_t       st_data,
  // pipeline status
  input  logic        pipe_drained
);

  reg_idx_t     q_addr;
  logic         q_sens, q_mod, dec_we, enc_we;
  logic [127:0] q_cipher, x_cipher;
  word_t        q_plain, x_plain;

  logic [SERIAL_W-1:0] ser_query, fin_serial;
  logic ser_registered;
  logic hash_valid, hash_first, hash_ready;
  word_t hash_word;
  logic fin_valid, fin_ready, verify_done, verify_ok;
  logic crypt_valid, crypt_decrypt, crypt_ready, crypt_done;
  blk_t crypt_data, crypt_result;

  decode_ext u_decode_ext (
    .clk, .rst_n,
    .id_valid, .id_instr, .id_stall, .id_secure, .id_lane, .secure_mode,
    .exc_valid, .exc_cause,
    .pipe_drained, .wb_secure_load(wb_we && wb_load && wb_secure),
    .q_addr, .q_sens, .q_mod, .q_cipher, .q_plain,
    .dec_we, .enc_we, .x_plain, .x_cipher,
    .ser_query, .ser_registered,
    .hash_valid, .hash_first, .hash_word, .hash_ready,
    .fin_valid, .fin_serial, .fin_ready, .verify_done, .verify_ok,
    .crypt_valid, .crypt_decrypt, .crypt_data, .crypt_ready, .crypt_done, .crypt_result
  );

  secure_regfile u_regfile (
    .clk, .rst_n,
    .rs1_addr, .rs2_addr, .rs1_data, .rs2_data, .rs1_sens, .rs2_sens,
    .wb_we, .wb_addr, .wb_data, .wb_load, .wb_secure, .wb_lane, .wb_sens,
    .st_addr, .st_secure, .st_lane, .st_data,
    .q_addr, .q_sens, .q_mod, .q_cipher, .q_plain,
    .dec_we, .enc_we, .x_plain, .x_cipher
  );

  smu #(.NUM_BLOCKS(NUM_BLOCKS), .MASTER_KEY(MASTER_KEY)) u_smu (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_lock, .cfg_erase, .cfg_locked,
    .ser_query, .ser_registered,
    .hash_valid, .hash_first, .hash_word, .hash_ready,
    .fin_valid, .fin_serial, .fin_ready, .verify_done, .verify_ok,
    .crypt_valid, .crypt_decrypt, .crypt_data, .crypt_ready, .crypt_done, .crypt_result
  );

endmodule
