// cfs_control_unit: phase sequencer of the comparison-free sorter.
//
// IDLE -> WRITE on start. WRITE (WRITE-ENA high) lasts exactly N cycles:
// the parallel counter counts every cycle and its terminal count (pc_last)
// moves to READ on the next edge, as the source design prescribes. READ
// (READ-ENA high) lasts until the counter advances past index N-1
// (pc_last with pc_advance), then DONE holds the result until the next
// start. start is accepted in IDLE and DONE only; in that cycle clear is
// high so the flags, the sorted array and the counter are zeroed on the
// same edge that enters WRITE. The IDLE and DONE states and the clear pulse
// are this design's choices. Asynchronous active-low reset to IDLE.
module cfs_control_unit
  import cfs_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   pc_last,
  input  logic   pc_advance,
  output logic   write_ena,
  output logic   read_ena,
  output logic   done,
  output logic   clear
);

  phase_e phase, phase_next;

  always_comb begin
    phase_next = phase;
    clear      = 1'b0;
    unique case (phase)
      PH_IDLE, PH_DONE: if (start) begin
        phase_next = PH_WRITE;
        clear      = 1'b1;
      end
      PH_WRITE: if (pc_last) phase_next = PH_READ;
      PH_READ:  if (pc_last && pc_advance) phase_next = PH_DONE;
      default:  phase_next = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= PH_IDLE;
    else        phase <= phase_next;
  end

  assign write_ena = (phase == PH_WRITE);
  assign read_ena  = (phase == PH_READ);
  assign done      = (phase == PH_DONE);

endmodule
