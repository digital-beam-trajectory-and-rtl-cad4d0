// sync_select: chooses the reference the numerical PLL locks to.
// Before injection the beam is not in the machine, so the PLL follows the
// digitised external RF. After the injection trigger the PU sum is watched;
// once |sum| has exceeded det_thresh on det_count consecutive revolutions
// the reference switches to the PU sum and stays there until the next
// cycle_start (or reset). mode forces the choice: 0 automatic, 1 RF only,
// 2 PU only. The RF-then-beam switching follows the original system; the detector
// (peak above threshold per turn) and its settings are this design's own.
// Timing: ref_out is registered, one clock after the inputs.
module sync_select
  import bto_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc_rf,
  input  logic signed [ADC_W-1:0] adc_sum,
  input  logic                    rev_tick,
  input  logic                    trig_inj,
  input  logic                    cycle_start,
  input  logic [1:0]              mode,
  input  logic [ADC_W-1:0]        det_thresh,
  input  logic [3:0]              det_count,
  output logic signed [ADC_W-1:0] ref_out,
  output logic                    src_pu,
  output logic                    switched   // pulse: automatic switch to PU
);
  logic       injected, pu_auto, seen;
  logic [3:0] turns;
  logic [ADC_W-1:0] mag;

  assign mag = adc_sum[ADC_W-1] ? ADC_W'(-adc_sum) : ADC_W'(adc_sum);

  always_ff @(posedge clk) begin
    if (!rst_n || cycle_start) begin
      injected <= 1'b0;
      pu_auto  <= 1'b0;
      seen     <= 1'b0;
      turns    <= '0;
      switched <= 1'b0;
    end else begin
      switched <= 1'b0;
      if (trig_inj) injected <= 1'b1;
      if (injected && !pu_auto) begin
        if (rev_tick) begin
          seen <= 1'b0;
          if (seen || mag > det_thresh) begin
            if (turns + 4'd1 >= det_count) begin
              pu_auto  <= 1'b1;
              switched <= 1'b1;
            end
            turns <= turns + 4'd1;
          end else begin
            turns <= '0;
          end
        end else if (mag > det_thresh) begin
          seen <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    unique case (mode)
      2'd1:    src_pu = 1'b0;
      2'd2:    src_pu = 1'b1;
      default: src_pu = pu_auto;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ref_out <= '0;
    else        ref_out <= src_pu ? adc_sum : adc_rf;
  end
endmodule
