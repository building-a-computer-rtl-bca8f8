// input_sync: synchroniser for asynchronous control inputs.
//
// Each of the W input bits passes through STAGES flip-flops in series
// (en_register instances that always load), so a metastable first stage has
// a clock period to settle before the control logic sees the value. The
// processor uses it for RESET and IRQ. Output q follows input d after STAGES
// rising clock edges. Two stages is this design's choice.
module input_sync #(
  parameter int unsigned W      = 2,
  parameter int unsigned STAGES = 2
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] chain [STAGES+1];

  assign chain[0] = d;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    en_register #(.W(W)) u_ff (
      .clk(clk), .rst(1'b0), .en(1'b1), .d(chain[s]), .q(chain[s+1])
    );
  end

  assign q = chain[STAGES];

endmodule
