// slot_timer: cell-slot phase counter of the buffer manager.
//
// Every block of the buffer manager does its pointer work at fixed clocks of
// a cell slot, so that no two blocks use the pointer memory or the queue
// registers at the same time. This counter supplies that schedule: `phase`
// runs 0 .. SLOT_CYCLES-1 and wraps, `soc` (start of cell) is high at phase 0
// and `slot_end` at the last phase. It starts at phase 0 after reset.
// The slot of ten clocks (five two-clock pipeline stages) is this design's
// reading of the description; the length is a parameter.
module slot_timer #(
  parameter int unsigned SLOT_CYCLES = bm_pkg::SLOT_CYCLES
) (
  input  logic                           clk,
  input  logic                           rst_n,
  output logic [$clog2(SLOT_CYCLES)-1:0] phase,
  output logic                           soc,
  output logic                           slot_end
);
  localparam int unsigned PW = $clog2(SLOT_CYCLES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   phase <= '0;
    else if (phase == PW'(SLOT_CYCLES - 1))       phase <= '0;
    else                                          phase <= phase + 1'b1;
  end

  assign soc      = (phase == '0);
  assign slot_end = (phase == PW'(SLOT_CYCLES - 1));
endmodule
