// bf_controller: event-driven sequencer of the BrainForest processor.
//
// Work is done only when the brain signal gives reason to:
//   PH_IDLE   wait for adc_valid; the sample set goes to the RAF filters
//   PH_FILTER the firing logic evaluates the filtered samples
//   PH_FIRE   fire flags are known. No neuron fired: back to idle, the
//             forest and decision function stay still (the common case).
//   PH_SERIAL SERIAL_CYCLES cycles of bit-serial EDM updates and comparisons in
//             the tiles whose neuron fired; on the last bit the weight
//             generator and accumulator are (pre)loaded
//   PH_STREAM STREAM_CYCLES cycles: the decision stream is rotated through the
//             decision function, one tree and one regenerated weight a cycle
//   PH_RESULT the decision function latches the class
// A classification therefore ends 3 + SERIAL_CYCLES + STREAM_CYCLES cycles after the
// sample (1060 at defaults; at 1 MHz and 256 samples/s there are about
// 3900 cycles per sample). The phase split and counts are this design's.
//
// Rules (asserted): adc_valid and cfg_en only while idle.
module bf_controller
  import bf_pkg::*;
#(
  parameter int unsigned SERIAL_CYCLES = bf_pkg::SER_LEN,
  parameter int unsigned STREAM_CYCLES = bf_pkg::N_TREES,
  parameter int unsigned CNT_W = $clog2(SERIAL_CYCLES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adc_valid,
  input  logic             cfg_en,
  input  logic             any_fire,
  output phase_t           phase,
  output logic             sample_en,
  output logic             serial_go,
  output logic [CNT_W-1:0] bit_idx,
  output logic             acc_start,
  output logic             rot_en,
  output logic             finish,
  output logic             busy
);

  localparam int unsigned M_W = $clog2(STREAM_CYCLES + 1);

  phase_t         phase_q;
  logic [M_W-1:0] m_q;

  assign phase     = phase_q;
  assign busy      = phase_q != PH_IDLE;
  assign sample_en = phase_q == PH_IDLE && adc_valid && !cfg_en;
  assign serial_go = phase_q == PH_SERIAL;
  assign acc_start = serial_go && bit_idx == CNT_W'(SERIAL_CYCLES - 1);
  assign rot_en    = phase_q == PH_STREAM;
  assign finish    = phase_q == PH_RESULT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_IDLE;
      bit_idx <= '0;
      m_q     <= '0;
    end else begin
      unique case (phase_q)
        PH_IDLE:   if (sample_en) phase_q <= PH_FILTER;
        PH_FILTER: phase_q <= PH_FIRE;
        PH_FIRE: begin
          bit_idx <= '0;
          phase_q <= any_fire ? PH_SERIAL : PH_IDLE;
        end
        PH_SERIAL: begin
          bit_idx <= bit_idx + 1'b1;
          if (bit_idx == CNT_W'(SERIAL_CYCLES - 1)) begin
            m_q     <= '0;
            phase_q <= PH_STREAM;
          end
        end
        PH_STREAM: begin
          m_q <= m_q + 1'b1;
          if (m_q == M_W'(STREAM_CYCLES - 1)) phase_q <= PH_RESULT;
        end
        PH_RESULT: phase_q <= PH_IDLE;
        default:   phase_q <= PH_IDLE;
      endcase
    end
  end

  a_sample_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    adc_valid |-> phase_q == PH_IDLE)
    else $error("sample arrived while a classification was running");
  a_cfg_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_en |-> phase_q == PH_IDLE)
    else $error("configuration shifted while busy");

endmodule
