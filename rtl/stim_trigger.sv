// stim_trigger: closes the loop from the classifier to the neurostimulator.
//
// Every completed classification (valid) that finds the target state
// issues a one-cycle trigger to the stimulation DAC, provided stimulation
// is enabled by the 1-bit scan-chain register stim_en. Without the enable
// the classifier can run in a monitor-only mode. The enable and the
// one-trigger-per-classification rule are this design's choices.
//
// Timing: trigger is registered, one cycle after valid.
module stim_trigger (
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  logic class_in,
  output logic trigger,
  output logic stim_en,
  input  logic cfg_en,
  input  logic cfg_si,
  output logic cfg_so
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stim_en <= 1'b0;
      trigger <= 1'b0;
    end else begin
      if (cfg_en) stim_en <= cfg_si;
      trigger <= valid && class_in && stim_en;
    end
  end
  assign cfg_so = stim_en;

endmodule
