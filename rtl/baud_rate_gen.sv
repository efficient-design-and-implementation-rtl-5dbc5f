// Baud rate generation: collects K serial bits into one symbol code.
//
// On every bit_stb the DIN bit is shifted into a K-bit register (first bit
// received ends up in the MSB). On sym_stb, which must coincide with the K-th
// bit strobe of the symbol, the K bits including the one sampled on that clock
// are transferred to b, and the differential code bx is updated as
// bx <= bx XOR code, the encoder used for DPSK (K = 1) and, bit by bit, DQPSK
// (K = 2). The code is transmitted during the following symbol period.
// Capturing K bits per symbol and an XOR for the differential code follow the
// reference design; the recursive form of the XOR, the bit order and the
// one-symbol delay are this design's choices.
//
// Interface: run (ST) low clears the shift register and both codes.
module baud_rate_gen #(
  parameter int unsigned K = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  input  logic         bit_stb,
  input  logic         sym_stb,
  input  logic         din,
  output logic [K-1:0] b,
  output logic [K-1:0] bx
);

  logic [K-1:0] shreg;
  logic [K-1:0] shreg_next;

  assign shreg_next = K'({shreg, din});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      b     <= '0;
      bx    <= '0;
    end else if (!run) begin
      shreg <= '0;
      b     <= '0;
      bx    <= '0;
    end else begin
      if (bit_stb) shreg <= shreg_next;
      if (sym_stb) begin
        b  <= shreg_next;
        bx <= bx ^ shreg_next;
      end
    end
  end

  // A symbol boundary is always also a bit boundary.
  assert property (@(posedge clk) sym_stb |-> bit_stb)
    else $error("sym_stb without bit_stb");

endmodule
