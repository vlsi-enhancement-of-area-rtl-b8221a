// control_logic: sequencer of one encrypt -> decrypt -> store pass.
//
// IDLE: a start pulse launches the encryption module (enc_start, one cycle)
//       and moves to ENC.
// ENC:  waits for enc_done, then launches the decryption module on the fresh
//       ciphertext (dec_start) and moves to DEC.
// DEC:  waits for dec_done, then writes the recovered text to memory (mem_we)
//       and moves to STORE.
// STORE: the memory takes the word on this edge; done pulses, back to IDLE.
// All outputs are registered one-cycle pulses except busy (state != IDLE).
// start while busy is ignored. Synchronous active-high reset to IDLE; the
// state encoding is this design's choice.
module control_logic (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic enc_done,
  input  logic dec_done,
  output logic enc_start,
  output logic dec_start,
  output logic mem_we,
  output logic busy,
  output logic done
);
  typedef enum logic [1:0] {IDLE, ENC, DEC, STORE} state_t;

  state_t state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      enc_start <= 1'b0;
      dec_start <= 1'b0;
      mem_we    <= 1'b0;
      done      <= 1'b0;
    end else begin
      enc_start <= 1'b0;
      dec_start <= 1'b0;
      mem_we    <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          enc_start <= 1'b1;
          state     <= ENC;
        end
        ENC: if (enc_done) begin
          dec_start <= 1'b1;
          state     <= DEC;
        end
        DEC: if (dec_done) begin
          mem_we <= 1'b1;
          state  <= STORE;
        end
        STORE: begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // A done from a unit that was not launched breaks the sequence.
  a_enc_done_in_enc: assert property (@(posedge clk) disable iff (rst) enc_done |-> state == ENC);
  a_dec_done_in_dec: assert property (@(posedge clk) disable iff (rst) dec_done |-> state == DEC);
endmodule
