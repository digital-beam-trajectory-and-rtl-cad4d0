// bto_pkg: types and constants shared by the beam trajectory and orbit
// acquisition logic. Sample widths follow the 14-bit ADCs and the 24-bit
// internal data bus; the phase-table entry, result record and event
// encodings are this design's own choices.
package bto_pkg;

  localparam int ADC_W   = 14;  // ADC sample width
  localparam int BUS_W   = 24;  // internal data bus / integrator result width
  localparam int SIG_W   = 18;  // baseline-restored sample width
  localparam int REC_W   = 128; // SDRAM record: one bunch, four 32-bit words

  // One phase-table entry: what happens at this point of the revolution.
  typedef struct packed {
    logic lo_en;   // LO pulse active (mixer multiplies by +1 or -1)
    logic lo_neg;  // LO polarity: 1 = -1
    logic gate;    // integration gate
    logic blr;     // baseline-restoration window
  } pt_entry_t;

  // Per-bunch integration result.
  typedef struct packed {
    logic [7:0]              bunch; // bunch index within the revolution
    logic [23:0]             turn;  // revolution counter
    logic signed [BUS_W-1:0] sum;
    logic signed [BUS_W-1:0] dx;
    logic signed [BUS_W-1:0] dy;
  } result_t;

  // Events logged by the pointer array.
  typedef enum logic [1:0] {
    EV_HARM = 2'd0,  // harmonic change / phase-table swap
    EV_INJ  = 2'd1,  // injection trigger
    EV_MS   = 2'd2   // 1 ms machine reference tick
  } event_e;

  // SDRAM record layout: {tag, sum, dx, dy}, each field in a 32-bit word.
  function automatic logic [REC_W-1:0] pack_record(result_t r);
    return {r.bunch, r.turn,
            {{(32-BUS_W){r.sum[BUS_W-1]}}, r.sum},
            {{(32-BUS_W){r.dx[BUS_W-1]}},  r.dx},
            {{(32-BUS_W){r.dy[BUS_W-1]}},  r.dy}};
  endfunction

endpackage
