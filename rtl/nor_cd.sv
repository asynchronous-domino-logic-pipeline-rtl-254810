// nor_cd -- APCDP completion detector: one static NOR gate on the critical
// dual-rail pair of a stage, followed by the drive buffer chain that carries
// the stage's total done signal to the precharge/evaluate port of the stage
// before.
//
// done = NOR(t, f): 1 while the critical output is a spacer (stage precharged,
// the stage before may evaluate), 0 once it is valid (stage evaluated, the
// stage before must precharge). A single bit stands for the whole data width,
// so the detector does not grow with the datapath.
// Timing: NOR_DLY ticks for the gate plus BUF_DLY ticks for the buffer chain;
// the split of delays into ticks is this model's choice.
module nor_cd
  import apcdp_pkg::*;
#(
  parameter int unsigned NOR_DLY = 1,
  parameter int unsigned BUF_DLY = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  dr_t  crit,      // critical dual-rail output of this stage
  output logic done       // to pc_n of the previous stage
);

  localparam int unsigned D = NOR_DLY + BUF_DLY;
  logic [D-1:0] line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) line <= '1;   // pipeline starts empty: every stage evaluates
    else        line <= D'({line, ~(crit.t | crit.f)});
  end

  assign done = line[D-1];

endmodule
