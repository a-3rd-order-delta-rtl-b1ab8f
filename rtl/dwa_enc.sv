// dwa_enc: data weighted averaging element selector for the 15 unit capacitors.
//
// Each clock the thermometer input asks for n elements. They are taken as a consecutive run
// starting at the element after the last one used in the previous clock, wrapping from
// element 15 back to element 1, so every element is used equally often and the mismatch
// error is pushed to high frequencies. Implemented as a rotation of the thermometer word by a
// pointer held modulo 15: sel = rotate_left(therm, ptr), then ptr <= (ptr + n) mod 15.
//
// Timing: sel is registered, one clock after therm. The pointer starts at element 1 after
// reset (the reset value is this design's choice). Bit i of sel drives element i+1.
module dwa_enc
  import dac_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  therm_t therm,
  output therm_t sel,
  output logic [$clog2(N_ELEM)-1:0] ptr,
  output logic   wrap          // the run of the last clock crossed element 15 -> 1
);
  localparam int PW = $clog2(N_ELEM);

  logic [PW:0]          nsel;
  logic [PW+1:0]        sum;
  logic [2*N_ELEM-1:0]  dbl;
  therm_t               rot;

  always_comb begin
    nsel = '0;
    for (int i = 0; i < N_ELEM; i++) nsel = nsel + (PW+1)'(therm[i]);
    dbl  = {therm, therm} << ptr;
    rot  = dbl[2*N_ELEM-1:N_ELEM];
    sum  = (PW+2)'(ptr) + (PW+2)'(nsel);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel  <= '0;
      ptr  <= '0;
      wrap <= 1'b0;
    end else begin
      sel  <= rot;
      wrap <= (sum > (PW+2)'(N_ELEM));
      ptr  <= (sum >= (PW+2)'(N_ELEM)) ? PW'(sum - (PW+2)'(N_ELEM)) : PW'(sum);
    end
  end
endmodule
