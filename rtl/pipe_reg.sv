// Pipeline register: holds the values and control bits one stage hands to
// the next (IF/ID, ID/EX, EX/MEM and MEM/WB are all instances of it).
//
// On each rising clock edge with en high q takes d; with en low it holds
// (used only when the optional hazard detection stalls the pipeline). An asynchronous active-high reset
// clears it to all zeros; since a zero control field writes neither memory
// nor registers, a cleared register holds a no-op (a bubble). The type of
// the stored bundle is a parameter so each stage boundary can use its own
// struct.
module pipe_reg #(
  parameter type T = logic [15:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= '0;
    else if (en) q <= d;
  end

endmodule
