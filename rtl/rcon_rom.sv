// rcon_rom: round-constant ROM of the key generation module.
//
// Addressed by the 4-bit round counter: entry i holds the AES round constant
// x^i in GF(2^8), which is the constant XORed in when round key i+1 is formed
// from round key i. Entries 10..15 are never used and read as zero (this
// design's choice). Combinational.
module rcon_rom (
  input  logic [3:0] addr,
  output logic [7:0] rcon
);
  always_comb begin
    unique case (addr)
      4'd0:    rcon = 8'h01;
      4'd1:    rcon = 8'h02;
      4'd2:    rcon = 8'h04;
      4'd3:    rcon = 8'h08;
      4'd4:    rcon = 8'h10;
      4'd5:    rcon = 8'h20;
      4'd6:    rcon = 8'h40;
      4'd7:    rcon = 8'h80;
      4'd8:    rcon = 8'h1b;
      4'd9:    rcon = 8'h36;
      default: rcon = 8'h00;
    endcase
  end
endmodule
