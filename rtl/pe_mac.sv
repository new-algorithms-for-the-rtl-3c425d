// pe_mac: the multiplier (M) and adder (A) of a processing element.
//
// M multiplies the resident element by the streamed element; A adds the
// product to the running sum, which it keeps in its own accumulator register
// (the adder output fed back to its input). 'first' starts a new sum with the
// product alone, so one dot product follows another with no idle step.
//
// Interface: sum is combinational (the accumulator value after this step);
// acc is updated at the rising edge when en is high. Arithmetic wraps modulo
// 2**DATA_W. The M-A-accumulator loop follows the paper's PE figure; the
// single-cycle timing and integer arithmetic are this design's choice.
module pe_mac
  import mat_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  first,
  input  data_t a,
  input  data_t b,
  output data_t sum,
  output data_t acc
);

  data_t prod;

  always_comb begin
    prod = a * b;
    sum  = first ? prod : acc + prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= sum;
  end

endmodule
