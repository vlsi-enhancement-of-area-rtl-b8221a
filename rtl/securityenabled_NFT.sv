// securityenabled_NFT: shared-key AES-128 link with storage.
//
// The plaintext block data_in is encrypted with key by the encryption module
// (aesc1), the ciphertext aes_encod travels to the decryption module (aesd1),
// which recovers it with the same key as aes_decod, and the recovered block is
// written into the memory buffer (mem1). control_logic sequences the pass.
// Instance names and the chain cipher -> decipher -> memory follow the
// architecture's RTL view; start/busy/done and the memory read port are this
// design's additions.
//
// Timing: a start pulse while idle gives done 38 clock edges later
// (1 to launch + 12 encryption + 1 handover + 23 decryption + 1 store);
// aes_encod and aes_decod stay valid until the next pass. When done is seen
// the word is already in memory, at the address mem_wr_ptr showed before; mem_wrapped rises
// once the buffer has been filled and starts overwriting its oldest word.
module securityenabled_NFT #(
  parameter int unsigned MEM_DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         start,
  input  aes_pkg::state_t              data_in,
  input  aes_pkg::state_t              key,
  input  logic [$clog2(MEM_DEPTH)-1:0] mem_rd_addr,
  output aes_pkg::state_t              aes_encod,
  output aes_pkg::state_t              aes_decod,
  output aes_pkg::state_t              mem,
  output logic [$clog2(MEM_DEPTH)-1:0] mem_wr_ptr,
  output logic                         mem_wrapped,
  output logic                         busy,
  output logic                         done
);
  logic enc_start, enc_done, enc_busy;
  logic dec_start, dec_done, dec_busy;
  logic mem_we;

  control_logic u_ctrl (
    .clk, .rst, .start, .enc_done, .dec_done,
    .enc_start, .dec_start, .mem_we, .busy, .done
  );

  aes_cipher aesc1 (
    .clk, .rst, .start(enc_start), .data(data_in), .key,
    .cipher(aes_encod), .done(enc_done), .busy(enc_busy)
  );

  aes_decipher aesd1 (
    .clk, .rst, .start(dec_start), .cipher(aes_encod), .key,
    .text(aes_decod), .done(dec_done), .busy(dec_busy)
  );

  mem13_and #(.DEPTH(MEM_DEPTH)) mem1 (
    .clk, .rst, .we(mem_we), .wdata(aes_decod), .raddr(mem_rd_addr),
    .rdata(mem), .wr_ptr(mem_wr_ptr), .wrapped(mem_wrapped)
  );

  // The two units run one after the other, never together.
  a_serial_units: assert property (@(posedge clk) disable iff (rst) !(enc_busy && dec_busy));
endmodule
