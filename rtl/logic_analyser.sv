// logic_analyser: embedded signal recorder for remote diagnostics.
// NPROBE internal signals (each PROBE_W bits, sign-extended by the caller)
// are offered; two of them, chosen by sel_a and sel_b, are recorded. After
// arm, the analyser waits for a rising edge on the trigger bit chosen by
// trig_sel, waits delay clocks, then stores 2^LA_AW samples of {a, b},
// taking one sample every decim+1 clocks so that the same memory covers
// short or long time scales. done is then set and the host reads sample
// rd_addr on rd_data one clock later. A new arm restarts a capture.
// Triggers, delay, signal choice and time scales follow the original system; the
// probe count, depth and single-shot post-trigger capture are this
// design's choices.
module logic_analyser
  import bto_pkg::*;
#(
  parameter int NPROBE  = 8,
  parameter int PROBE_W = 24,
  parameter int NTRIG   = 8,
  parameter int LA_AW   = 10
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [NPROBE-1:0][PROBE_W-1:0]    probes,
  input  logic [NTRIG-1:0]                  trigs,
  input  logic [$clog2(NPROBE)-1:0]         sel_a,
  input  logic [$clog2(NPROBE)-1:0]         sel_b,
  input  logic [$clog2(NTRIG)-1:0]          trig_sel,
  input  logic [23:0]                       delay,
  input  logic [15:0]                       decim,
  input  logic                              arm,
  output logic                              armed,
  output logic                              done,
  output logic                              triggered,  // pulse: trigger seen
  input  logic [LA_AW-1:0]                  rd_addr,
  output logic [2*PROBE_W-1:0]              rd_data
);
  typedef enum logic [2:0] {S_IDLE, S_ARMED, S_DELAY, S_CAPT, S_DONE} state_e;
  state_e state;

  logic [2*PROBE_W-1:0] mem [2**LA_AW];
  logic [LA_AW-1:0]     wa;
  logic [23:0]          dcnt;
  logic [15:0]          scnt;
  logic                 trig_d, trig_rise, we;

  assign trig_rise = trigs[trig_sel] && !trig_d;
  assign we        = (state == S_CAPT) && (scnt == '0);
  assign armed     = (state == S_ARMED);
  assign done      = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= {probes[sel_a], probes[sel_b]};
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      trig_d    <= 1'b0;
      wa        <= '0;
      dcnt      <= '0;
      scnt      <= '0;
      triggered <= 1'b0;
    end else begin
      trig_d    <= trigs[trig_sel];
      triggered <= 1'b0;
      if (arm) begin
        state <= S_ARMED;
        wa    <= '0;
      end else begin
        unique case (state)
          S_IDLE, S_DONE: ;
          S_ARMED: if (trig_rise) begin
            triggered <= 1'b1;
            dcnt      <= delay;
            scnt      <= '0;
            state     <= (delay == '0) ? S_CAPT : S_DELAY;
          end
          S_DELAY: begin
            dcnt <= dcnt - 24'd1;
            if (dcnt == 24'd1) state <= S_CAPT;
          end
          S_CAPT: begin
            scnt <= (scnt == decim) ? '0 : scnt + 16'd1;
            if (we) begin
              wa <= wa + 1'b1;
              if (&wa) state <= S_DONE;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
