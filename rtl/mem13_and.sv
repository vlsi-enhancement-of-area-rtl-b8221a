// mem13_and: memory buffer for the deciphered blocks.
//
// The architecture stores each recovered 128-bit block in a memory for later
// use. Here it is a register array of DEPTH words: a write (we) stores wdata at
// the write pointer, which then advances and wraps around to 0 after the last
// word, setting `wrapped` (older words are overwritten). rdata is the word at
// raddr, combinationally. Synchronous active-high reset clears the pointer,
// the wrap flag and the contents. Depth, circular addressing and read timing
// are this design's choices.
module mem13_and #(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,
  input  aes_pkg::state_t          wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output aes_pkg::state_t          rdata,
  output logic [$clog2(DEPTH)-1:0] wr_ptr,
  output logic                     wrapped
);
  localparam int unsigned AW = $clog2(DEPTH);

  aes_pkg::state_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr  <= '0;
      wrapped <= 1'b0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[wr_ptr] <= wdata;
      if (wr_ptr == AW'(DEPTH - 1)) begin
        wr_ptr  <= '0;
        wrapped <= 1'b1;
      end else begin
        wr_ptr <= wr_ptr + 1'b1;
      end
    end
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;
endmodule
