// input_mux: residual-potential input selector and hold register.
//
// Presents to the region detector the residual potential of the previous
// stimulation phase. The 2:1 selector either keeps the held value or takes
// the new ADC word when adc_valid is high; the held word stays stable for the
// whole stimulation cycle, so the rest of the processor sees one sample per
// phase. sample_valid pulses for one cycle, the cycle after the word was taken.
//
// The block name and its place at the head of the datapath follow the source
// description; its insides (hold register and valid pulse) are this design's.
// The ADC word is taken as a signed two's-complement residual code (cb_pkg).
module input_mux
  import cb_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic adc_valid,
  input  ve_t  adc_data,
  output ve_t  ve_hold,
  output logic sample_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ve_hold      <= '0;
      sample_valid <= 1'b0;
    end else begin
      ve_hold      <= adc_valid ? adc_data : ve_hold;
      sample_valid <= adc_valid;
    end
  end

endmodule
