// secret_store: the SMU's on-chip store of secrets (the "Secret" box of the
// SMU). It holds the device master key, fixed at fabrication (the MASTER_KEY
// parameter), the application data key and one reference hash per sensitive
// block, both written at configuration time.
//
// The application part models an electrically erasable nonvolatile memory:
// its contents and the lock flag are not cleared by reset. Configuration
// writes are accepted only while the store is unlocked; cfg_lock closes it
// for good, and only cfg_erase (which wipes the key and every hash valid
// flag) opens it again, so re-provisioning new code hashes always destroys
// the key that protects the existing data. Nothing in this store can be read
// from outside the SMU.
// What is stored, and that the master key is fixed at fabrication while the
// rest is written at configuration time, follow the architecture; the
// lock/erase protocol and the address map are this design's choice.
//
// Configuration address map (32-bit words, cfg_addr[15:14] selects):
//   2'b00: application key, cfg_addr[1:0] = word (word 0 = key[127:96])
//   2'b01: hash of block cfg_addr[13:2], cfg_addr[1:0] = word
//   2'b10: valid flag of block cfg_addr[13:0], cfg_wdata[0]
// Timing: writes take effect at the next clock edge; reads are combinational.
module secret_store #(
  parameter int unsigned  NUM_BLOCKS = 64,
  parameter logic [127:0] MASTER_KEY = 128'h5ec5_0c00_1234_5678_9abc_def0_0fed_cba9
) (
  input  logic         clk,
  // configuration port
  input  logic         cfg_we,
  input  logic [15:0]  cfg_addr,
  input  logic [31:0]  cfg_wdata,
  input  logic         cfg_lock,
  input  logic         cfg_erase,
  output logic         locked,
  // key outputs to the cipher
  output logic [127:0] master_key,
  output logic [127:0] app_key,
  // hash table read port
  input  logic [$clog2(NUM_BLOCKS)-1:0] rd_idx,
  output logic [127:0] rd_hash,
  output logic         rd_valid,
  // block registration query
  input  logic [$clog2(NUM_BLOCKS)-1:0] q_idx,
  output logic         q_valid
);

  localparam int unsigned IW = $clog2(NUM_BLOCKS);

  logic [127:0]          hash_mem [NUM_BLOCKS];
  logic [NUM_BLOCKS-1:0] valid_q;
  logic [127:0]          key_q;
  logic                  lock_q;

  wire [1:0]  region = cfg_addr[15:14];
  wire [11:0] entry  = cfg_addr[13:2];
  wire [1:0]  word   = cfg_addr[1:0];
  wire        wr_ok  = cfg_we && !lock_q && !cfg_erase;

  always_ff @(posedge clk) begin
    if (cfg_erase) begin
      key_q   <= '0;
      valid_q <= '0;
      lock_q  <= 1'b0;
    end else begin
      if (cfg_lock) lock_q <= 1'b1;
      if (wr_ok) begin
        if (region == 2'b00)
          key_q[127 - 32*word -: 32] <= cfg_wdata;
        if (region == 2'b10 && cfg_addr[13:0] < 14'(NUM_BLOCKS))
          valid_q[IW'(cfg_addr[13:0])] <= cfg_wdata[0];
      end
    end
  end

  always_ff @(posedge clk)
    if (wr_ok && region == 2'b01 && entry < 12'(NUM_BLOCKS))
      hash_mem[IW'(entry)][127 - 32*word -: 32] <= cfg_wdata;

  assign locked     = lock_q;
  assign master_key = MASTER_KEY;
  assign app_key    = key_q;
  assign rd_hash    = hash_mem[rd_idx];
  assign rd_valid   = valid_q[rd_idx];
  assign q_valid    = valid_q[q_idx];

endmodule
