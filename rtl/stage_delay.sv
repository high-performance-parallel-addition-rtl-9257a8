// stage_delay -- behavioural timing model of one pipe stage's logic path.
//
// In a wave-pipelined stage the logic is padded so that every path takes
// about the same time, long enough that several independent data waves are
// inside the stage at once. This model gives the zero-delay logic that
// precedes it that behaviour, including data dispersion: a change of din
// starts to show at the output after the shortest path delay MIN_DELAY_PS and
// has settled after the longest path delay DELAY_PS. In between the output is
// not valid; the model then shows the settled word inverted, so a register
// that samples inside that window takes a wrong value.
//
// Both delays are built from segments of SEG_PS picoseconds, like a chain of
// gates: a new value launched every clock period does not cancel the one
// still in flight, and a pulse shorter than one segment is lost. With
// MIN_DELAY_PS = DELAY_PS the stage has no dispersion; DELAY_PS = 0 makes it
// a wire. In synthesis the delays are ignored and it is a wire as well.
// The delay values are this design's choices; both must be multiples of
// SEG_PS, and MIN_DELAY_PS may not exceed DELAY_PS.
module stage_delay #(
  parameter int unsigned W            = 96,
  parameter int unsigned DELAY_PS     = 1500,
  parameter int unsigned MIN_DELAY_PS = 1040,
  parameter int unsigned SEG_PS       = 20
) (
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NMAX = DELAY_PS / SEG_PS;
  localparam int unsigned NMIN = MIN_DELAY_PS / SEG_PS;

  if (DELAY_PS % SEG_PS != 0 || MIN_DELAY_PS % SEG_PS != 0 || MIN_DELAY_PS > DELAY_PS) begin : g_bad_delay
    $error("stage_delay: delays must be multiples of SEG_PS, MIN_DELAY_PS <= DELAY_PS");
  end

  // One segment chain; the shortest path taps it early, the longest at the end.
  logic [W-1:0] seg [NMAX+1];
  assign seg[0] = din;
  for (genvar k = 0; k < NMAX; k++) begin : g_seg
    assign #(SEG_PS) seg[k+1] = seg[k];
  end

  logic [W-1:0] early, late;
  assign early = seg[NMIN];
  assign late  = seg[NMAX];
  // While some change is between its earliest and latest arrival the two taps
  // differ and the output is not valid.
  assign dout = (early == late) ? late : ~late;
endmodule
