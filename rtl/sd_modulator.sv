// sd_modulator: first-order digital sigma-delta (pulse-density) modulator.
//
// Each clock the W-bit input is added to a W-bit accumulator; the carry out
// of that addition is the output bit and the remainder stays in the
// accumulator (the integrator and 1-bit quantizer of a sigma-delta loop, with
// the quantization error fed back). Over any 2^W clocks the number of ones
// equals digital_val_in, so the stream averages to digital_val_in / 2^W and
// its quantization noise is pushed to high frequencies, where an RC filter
// removes it. Output is registered: one clock of latency.
// The 8-bit input and 1-bit output follow the source pin-out; building the
// loop digitally (error-feedback accumulator) is this design's choice.
module sd_modulator #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] digital_val_in,
  output logic         sigma_delta_out
);

  logic [W-1:0] acc;
  logic [W:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, digital_val_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc             <= '0;
      sigma_delta_out <= 1'b0;
    end else begin
      acc             <= sum[W-1:0];
      sigma_delta_out <= sum[W];
    end
  end

endmodule
