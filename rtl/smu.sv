// smu: Security Management Unit. Keeps the secrets on chip and performs the
// security primitives for the compute core: AES-128 encryption and
// decryption of sensitive data, and hashing and verification of the
// instruction words of each sensitive block.
//
// One aes128_core is shared by all requests; a small sequencer serves one
// request at a time, so every ready signal is low while the cipher works.
//  - Hash stream: 32-bit instruction words (hash_first marks a block's
//    first word). Words are packed four to a 128-bit chunk (first word most
//    significant) and chained as a CBC-MAC under the master key:
//    H = AES(Kmaster, H ^ chunk), H starting at zero.
//  - Finalise (fin_*): one last chunk holding the 0..3 leftover words, zeros
//    and the total word count in bits [31:0] is chained in; the result is
//    compared with the reference hash stored for the block's serial number,
//    and verify_done pulses with verify_ok.
//  - Crypt (crypt_*): encrypts or decrypts one 128-bit block under the
//    application key written at configuration time.
//  - ser_registered tells whether a serial number has a stored hash.
// The design asks for AES-based encryption, decryption and hashing and for
// stored block hashes; the MAC construction, the choice of keys and the
// single shared cipher are this design's own.
// Timing: a hash chunk or finalise takes 11 cycles of cipher time, an
// encryption 11 and a decryption 21 (from accept to the done pulse).
module smu
  import secsoc_pkg::*;
#(
  parameter int unsigned  NUM_BLOCKS = 64,
  parameter logic [127:0] MASTER_KEY = 128'h5ec5_0c00_1234_5678_9abc_def0_0fed_cba9
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration of the secret store
  input  logic        cfg_we,
  input  logic [15:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  input  logic        cfg_lock,
  input  logic        cfg_erase,
  output logic        cfg_locked,
  // serial number registration query
  input  logic [SERIAL_W-1:0] ser_query,
  output logic        ser_registered,
  // instruction hash stream
  input  logic        hash_valid,
  input  logic        hash_first,
  input  word_t       hash_word,
  output logic        hash_ready,
  // hash finalise and verify
  input  logic        fin_valid,
  input  logic [SERIAL_W-1:0] fin_serial,
  output logic        fin_ready,
  output logic        verify_done,
  output logic        verify_ok,
  // encryption / decryption
  input  logic        crypt_valid,
  input  logic        crypt_decrypt,
  input  blk_t        crypt_data,
  output logic        crypt_ready,
  output logic        crypt_done,
  output blk_t        crypt_result
);

  localparam int unsigned IW = $clog2(NUM_BLOCKS);

  typedef enum logic [1:0] {S_IDLE, S_HASH, S_FIN, S_CRYPT} state_e;

  state_e        state_q;
  blk_t          h_q;        // running MAC
  blk_t          chunk_q;    // words gathered for the next chunk
  logic [1:0]    k_q;        // words in chunk_q
  logic [15:0]   n_q;        // words hashed in this block
  logic [SERIAL_W-1:0] ser_q;

  logic          aes_start, aes_dec, aes_busy, aes_done;
  blk_t          aes_key, aes_din, aes_dout;
  logic [127:0]  master_key, app_key, rd_hash;
  logic          rd_valid, q_valid;

  // next chunk with the incoming word inserted
  logic [1:0]    k_eff;
  blk_t          chunk_ins, h_eff;

  wire idle = (state_q == S_IDLE) && !aes_busy;
  assign fin_ready   = idle;
  assign hash_ready  = idle && !fin_valid;
  assign crypt_ready = idle && !fin_valid && !hash_valid;

  wire fin_go   = fin_valid && fin_ready;
  wire hash_go  = hash_valid && hash_ready;
  wire crypt_go = crypt_valid && crypt_ready;

  always_comb begin
    k_eff     = hash_first ? 2'd0 : k_q;
    h_eff     = hash_first ? '0 : h_q;
    chunk_ins = hash_first ? '0 : chunk_q;
    chunk_ins[127 - 32*k_eff -: 32] = hash_word;
  end

  always_comb begin
    aes_start = 1'b0;
    aes_dec   = 1'b0;
    aes_key   = master_key;
    aes_din   = h_q ^ {chunk_q[127:32], 16'h0, n_q};
    if (fin_go) begin
      aes_start = 1'b1;
    end else if (hash_go) begin
      aes_start = (k_eff == 2'd3);
      aes_din   = h_eff ^ chunk_ins;
    end else if (crypt_go) begin
      aes_start = 1'b1;
      aes_dec   = crypt_decrypt;
      aes_key   = app_key;
      aes_din   = crypt_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      h_q          <= '0;
      chunk_q      <= '0;
      k_q          <= '0;
      n_q          <= '0;
      ser_q        <= '0;
      verify_done  <= 1'b0;
      verify_ok    <= 1'b0;
      crypt_done   <= 1'b0;
      crypt_result <= '0;
    end else begin
      verify_done <= 1'b0;
      crypt_done  <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (fin_go) begin
            ser_q   <= fin_serial;
            state_q <= S_FIN;
          end else if (hash_go) begin
            n_q <= (hash_first ? 16'd0 : n_q) + 16'd1;
            if (k_eff == 2'd3) begin
              k_q     <= 2'd0;
              chunk_q <= '0;
              state_q <= S_HASH;
            end else begin
              k_q     <= k_eff + 2'd1;
              chunk_q <= chunk_ins;
              h_q     <= h_eff;
            end
          end else if (crypt_go) begin
            state_q <= S_CRYPT;
          end
        end
        S_HASH: if (aes_done) begin
          h_q     <= aes_dout;
          state_q <= S_IDLE;
        end
        S_FIN: if (aes_done) begin
          verify_done <= 1'b1;
          verify_ok   <= (aes_dout == rd_hash) && rd_valid && (ser_q < SERIAL_W'(NUM_BLOCKS));
          h_q         <= '0;
          chunk_q     <= '0;
          k_q         <= '0;
          n_q         <= '0;
          state_q     <= S_IDLE;
        end
        S_CRYPT: if (aes_done) begin
          crypt_done   <= 1'b1;
          crypt_result <= aes_dout;
          state_q      <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign ser_registered = (ser_query < SERIAL_W'(NUM_BLOCKS)) && q_valid;

  aes128_core u_aes (
    .clk, .rst_n,
    .start(aes_start), .decrypt(aes_dec), .key(aes_key), .din(aes_din),
    .busy(aes_busy), .done(aes_done), .dout(aes_dout)
  );

  secret_store #(.NUM_BLOCKS(NUM_BLOCKS), .MASTER_KEY(MASTER_KEY)) u_store (
    .clk,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_lock, .cfg_erase, .locked(cfg_locked),
    .master_key, .app_key,
    .rd_idx(IW'(ser_q)), .rd_hash, .rd_valid,
    .q_idx(IW'(ser_query)), .q_valid
  );

  // one result per request: the two completion pulses never coincide
  a_one_done: assert property (@(posedge clk) disable iff (!rst_n) !(verify_done && crypt_done));

endmodule
