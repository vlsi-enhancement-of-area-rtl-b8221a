// aes_decipher: iterative AES-128 decryption module.
//
// The same structure as the encryption module with every function replaced
// by its inverse: DATA REGISTER -> XOR with round key -> INVERSE MIX COLUMN ->
// MUX -> INVERSE S-BOX -> INVERSE SHIFT ROW -> DATA REGISTER. The first
// decryption round uses round key 10, the next round key 9 and so on, but the
// key generation module can only run forward. So the unit works in two phases
// of the shared 4-bit counter:
//   KEYS: the key generation module runs from the cipher key and round keys
//         0..10 are written into round_key_store (11 edges);
//   DEC:  in step k (0..9) state <= InvShiftRows(InvSubBytes(M(state ^ rk[10-k])))
//         with M = identity for k = 0 (mux bypass) and InvMixColumns after;
//         in step 10 text <= state ^ rk[0].
// Timing (this design's choice): done pulses 22 edges after the start edge;
// text holds its value until the next result. start while busy is ignored.
// Synchronous active-high reset. InvShiftRows is a fixed byte routing
// (aes_pkg::shift_rows), so it is wiring here rather than a module.
module aes_decipher (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  aes_pkg::state_t cipher,
  input  aes_pkg::state_t key,
  output aes_pkg::state_t text,
  output logic            done,
  output logic            busy
);
  import aes_pkg::*;

  typedef enum logic [1:0] {IDLE, KEYS, DEC} phase_t;

  phase_t     phase;
  state_t     data_reg, gen_key, stored_key, ark, imc, mux_out, isb, isr;
  logic [3:0] count, key_addr;
  logic       last;
  logic       load, key_step, clear;

  assign load     = start && (phase == IDLE);
  assign key_step = (phase == KEYS) && !last;
  // restart the counter at load and at the switch from KEYS to DEC
  assign clear    = load || ((phase == KEYS) && last);

  round_counter #(.LAST(4'(NROUNDS))) u_counter (
    .clk, .rst, .clear, .en(phase != IDLE), .count, .last
  );

  key_gen u_keygen (
    .clk, .rst, .load, .key_in(key), .en(key_step), .step(count), .round_key(gen_key)
  );

  assign key_addr = 4'(NROUNDS) - count;

  round_key_store #(.NKEYS(NROUNDS + 1)) u_keys (
    .clk, .we(phase == KEYS), .waddr(count), .wdata(gen_key),
    .raddr(key_addr), .rdata(stored_key)
  );

  assign ark = data_reg ^ stored_key;

  inv_mix_columns            u_imc (.din(ark), .dout(imc));
  // first decryption round has no InvMixColumns
  assign mux_out = (count == 4'd0) ? ark : imc;
  sub_bytes  #(.INVERSE(1'b1)) u_isb (.din(mux_out), .dout(isb));
  assign isr = shift_rows(isb, 1'b1);   // byte routing only

  always_ff @(posedge clk) begin
    if (rst) begin
      phase    <= IDLE;
      data_reg <= '0;
      text     <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        IDLE: if (load) begin
          data_reg <= cipher;
          phase    <= KEYS;
        end
        KEYS: if (last) phase <= DEC;
        DEC: begin
          if (last) begin
            text  <= ark;
            done  <= 1'b1;
            phase <= IDLE;
          end else begin
            data_reg <= isr;
          end
        end
        default: phase <= IDLE;
      endcase
    end
  end

  assign busy = (phase != IDLE);
endmodule
