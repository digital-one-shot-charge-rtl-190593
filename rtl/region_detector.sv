// region_detector: dual-threshold operation-region classifier.
//
// Compares the residual potential code against +-VTH1 (anodic pulse
// modulation threshold, 20 mV) and +-VTH2 (offset balance current threshold,
// 10 mV) and reports one of five regions (see cb_pkg for the map). Regions 1
// and 5 are unsafe; 2, 3 and 4 are safe and leave the balancer idle. The
// result is registered: region and region_valid appear one cycle after
// in_valid.
//
// The two thresholds and their values follow the source; the exact ordering
// of the five regions along the voltage axis and the treatment of values
// exactly on a threshold (counted as the inner region) are this design's.
module region_detector
  import cb_pkg::*;
#(
  parameter int unsigned VTH1 = VTH1_CODES_DEF,
  parameter int unsigned VTH2 = VTH2_CODES_DEF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  ve_t     ve,
  output region_e region,
  output logic    unsafe,
  output logic    region_valid
);

  region_e region_c;

  always_comb begin
    if      (ve >   $signed(VE_W'(VTH1))) region_c = REG1;
    else if (ve >   $signed(VE_W'(VTH2))) region_c = REG2;
    else if (ve >= -$signed(VE_W'(VTH2))) region_c = REG3;
    else if (ve >= -$signed(VE_W'(VTH1))) region_c = REG4;
    else                                  region_c = REG5;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      region       <= REG3;
      unsafe       <= 1'b0;
      region_valid <= 1'b0;
    end else begin
      region_valid <= in_valid;
      if (in_valid) begin
        region <= region_c;
        unsafe <= (region_c == REG1) || (region_c == REG5);
      end
    end
  end

  initial begin
    assert (VTH2 < VTH1) else $error("region_detector: VTH2 must be below VTH1");
  end

endmodule
