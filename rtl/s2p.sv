// s2p: serial-to-parallel input converter (1-bit serial audio data to 24-bit words).
//
// Audio samples enter the chip on one data pin to save pins and are assembled here into the
// 24-bit parallel words the interpolation filter works on. A bit is taken on every clock
// where bit_en is high; sync, high together with a word's first bit, marks that bit as the
// MSB and restarts the bit count, so a lost bit cannot shift later words. After the 24th bit
// the word appears on word with a one-clock word_valid pulse in the next cycle; word holds
// its value until the next word is complete.
//
// The serial-to-24-bit conversion is the source's; the bit order (MSB first), the sync
// marker and the strobe handshake are this design's choice, as the framing is not given.
module s2p #(
  parameter int W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_en,
  input  logic         sdata,
  input  logic         sync,
  output logic         word_valid,
  output logic [W-1:0] word
);
  localparam int CW = $clog2(W + 1);

  logic [W-1:0]  shreg;
  logic [CW-1:0] nbits;
  logic [CW-1:0] nbits_next;
  logic [W-1:0]  shreg_next;

  always_comb begin
    shreg_next = {shreg[W-2:0], sdata};
    nbits_next = sync ? CW'(1) : nbits + CW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      nbits      <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (bit_en) begin
        shreg <= shreg_next;
        if (nbits_next == CW'(W)) begin
          word       <= shreg_next;
          word_valid <= 1'b1;
          nbits      <= '0;
        end else begin
          nbits <= nbits_next;
        end
      end
    end
  end
endmodule
