// aes_cipher: iterative AES-128 encryption module, one round per clock.
//
// Datapath: DATA REGISTER -> XOR with round key -> SHIFT ROW -> S-BOX ->
// MIX COLUMN -> MUX -> DATA REGISTER. The mux takes the S-Box output directly
// (skipping MixColumns) in the last round. The XOR output is also the CIPHER
// result once the final round key has been added. The key generation module
// delivers round key i while the shared 4-bit round counter holds i; that
// counter is the only control: there is no separate controller.
//
// Timing (this design's choice): a start pulse while idle loads data and key
// (round key 0) and clears the counter. On each of the next 10 edges one round
// is computed and the next round key generated; on the 11th edge cipher is
// written and done pulses for one cycle. Thus done is seen 11 edges after the
// start edge, and cipher holds its value until the next result. start while
// busy is ignored. Synchronous active-high reset. ShiftRows is a fixed byte
// routing (aes_pkg::shift_rows), so it is wiring here rather than a module.
module aes_cipher (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  aes_pkg::state_t data,
  input  aes_pkg::state_t key,
  output aes_pkg::state_t cipher,
  output logic            done,
  output logic            busy
);
  import aes_pkg::*;

  state_t     data_reg, round_key, ark, sr, sb, mc, next_state;
  logic [3:0] count;
  logic       last;
  logic       load, step;

  assign load = start && !busy;
  assign step = busy && !last;

  round_counter #(.LAST(4'(NROUNDS))) u_counter (
    .clk, .rst, .clear(load), .en(step), .count, .last
  );

  key_gen u_keygen (
    .clk, .rst, .load, .key_in(key), .en(step), .step(count), .round_key
  );

  assign ark = data_reg ^ round_key;

  assign sr = shift_rows(ark, 1'b0);   // byte routing only
  sub_bytes   #(.INVERSE(1'b0)) u_sb (.din(sr),  .dout(sb));
  mix_columns                   u_mc (.din(sb),  .dout(mc));

  // final round (count == 9) bypasses MixColumns
  assign next_state = (count == 4'(NROUNDS - 1)) ? sb : mc;

  always_ff @(posedge clk) begin
    if (rst) begin
      data_reg <= '0;
      cipher   <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        data_reg <= data;
        busy     <= 1'b1;
      end else if (busy) begin
        if (last) begin
          cipher <= ark;
          done   <= 1'b1;
          busy   <= 1'b0;
        end else begin
          data_reg <= next_state;
        end
      end
    end
  end
endmodule
