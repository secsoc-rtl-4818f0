// aes128_core: iterative AES-128 block cipher, encryption and decryption.
//
// One AES round per clock. Round keys are derived on the fly, so no key
// schedule is stored: encryption steps the key schedule forward with the
// rounds; decryption first runs the schedule forward ten steps to reach the
// last round key, then walks it backward while applying the inverse rounds.
// The security management unit uses this core for both data protection and
// block hashing; the design only calls for "AES" with a 128-bit key, the
// iterative datapath and on-the-fly key schedule are this design's choice.
//
// Interface: pulse start for one cycle (accepted only while busy is low)
// with din, key and decrypt valid. done pulses for one cycle with dout valid;
// dout holds its value until the next start.
// Timing: done rises 10 clock edges after the edge that samples start for
// encryption and 20 edges after it for decryption (edges counted from the start edge).
module aes128_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   decrypt,
  input  block_t key,
  input  block_t din,
  output logic   busy,
  output logic   done,
  output block_t dout
);

  typedef enum logic [1:0] {S_IDLE, S_ENC, S_KEXP, S_DEC} state_e;

  state_e     state_q;
  logic [3:0] rnd_q;
  block_t     st_q;    // cipher state
  block_t     rk_q;    // current round key
  block_t     rk_fwd, rk_bwd, enc_sr, dec_sr;

  assign rk_fwd = key_step(rk_q, rnd_q);
  assign rk_bwd = inv_key_step(rk_q, rnd_q);
  assign enc_sr = shift_rows(sub_bytes(st_q));
  assign dec_sr = inv_sub_bytes(inv_shift_rows(st_q)) ^ rk_bwd;

  assign busy = (state_q != S_IDLE);
  assign dout = st_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      rnd_q   <= '0;
      st_q    <= '0;
      rk_q    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          rk_q  <= key;
          rnd_q <= 4'd1;
          if (decrypt) begin
            st_q    <= din;
            state_q <= S_KEXP;
          end else begin
            st_q    <= din ^ key;
            state_q <= S_ENC;
          end
        end
        S_ENC: begin
          rk_q  <= rk_fwd;
          rnd_q <= rnd_q + 4'd1;
          if (rnd_q == 4'd10) begin
            st_q    <= enc_sr ^ rk_fwd;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            st_q <= mix_columns(enc_sr) ^ rk_fwd;
          end
        end
        S_KEXP: begin
          rk_q <= rk_fwd;
          if (rnd_q == 4'd10) begin
            st_q    <= st_q ^ rk_fwd;   // initial AddRoundKey with round key 10
            state_q <= S_DEC;
          end else begin
            rnd_q <= rnd_q + 4'd1;
          end
        end
        S_DEC: begin
          rk_q  <= rk_bwd;
          rnd_q <= rnd_q - 4'd1;
          if (rnd_q == 4'd1) begin
            st_q    <= dec_sr;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            st_q <= inv_mix_columns(dec_sr);
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // a start while a block is in flight would be lost
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
