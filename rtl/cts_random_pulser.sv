// cts_random_pulser: pseudo random trigger source.
//
// A 32-bit CRC unit is fed a constant data word and its own previous result
// every clock cycle; the CRC value serves as a pseudo random number. The
// output is high in each cycle in which that number is smaller than the
// 32-bit threshold register, so the mean rate is
// f = 100 MHz * threshold / (2^32 - 1). A threshold of 0 disables the pulser.
// The CRC/comparator structure and the rate formula follow the design's
// description of the pseudo random pulser. The polynomial (0x04C11DB7, the
// Ethernet CRC-32), the constant data word, the seed and the per-instance
// seed offset are this implementation's choices.
//
// Timing: the output is registered; the random number advances every cycle.
module cts_random_pulser #(
  parameter logic [31:0] SEED       = 32'hffff_ffff,
  parameter logic [31:0] DATA_WORD  = 32'h0000_0000,
  parameter logic [31:0] POLYNOMIAL = 32'h04c1_1db7
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] threshold,
  output logic        pulse,
  output logic [31:0] prn      // current pseudo random number
);

  // One CRC step over a 32-bit data word, MSB first.
  function automatic logic [31:0] crc32_step(logic [31:0] crc, logic [31:0] data);
    logic [31:0] c;
    logic        fb;
    c = crc;
    for (int i = 31; i >= 0; i--) begin
      fb = c[31] ^ data[i];
      c  = {c[30:0], 1'b0};
      if (fb) c = c ^ POLYNOMIAL;
    end
    return c;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      prn   <= SEED;
      pulse <= 1'b0;
    end else begin
      prn   <= crc32_step(prn, DATA_WORD);
      pulse <= prn < threshold;
    end
  end

endmodule
