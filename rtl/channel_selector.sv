// channel_selector: reorders the four butterfly outputs of each cycle so that
// the results of a transform stage can be written back into the four RAM banks
// (RAM0..RAM3) without two coefficients targeting the same bank in one cycle.
//
// In cycle t the butterflies deliver X_2t, X_2t+1 (top pair, Btf_out0/1) and
// X_2t+d/2, X_2t+1+d/2 (bottom pair, Btf_out2/3). The bottom pair is always
// registered for one cycle. With sel = 0 ("solid" channels) the top pair goes
// straight to RAM0/RAM1 and the registered bottom pair to RAM2/RAM3; with
// sel = 1 ("dash" channels) the top pair goes to RAM2/RAM3 and the registered
// pair to RAM0/RAM1. The controller alternates sel every cycle, so a stage of
// d/4 input groups is written in d/4 + 1 cycles.
//
// The routing follows the published channel selector; loading the register
// every cycle and taking sel from the controller are this design's choices.
// Interface: btf[0..3] = Btf_out0..3, ram_in[0..3] = RAM0_in..RAM3_in.
// Timing: the register loads every cycle; outputs are combinational in sel.
module channel_selector #(
  parameter int unsigned DW = 226
) (
  input  logic          clk,
  input  logic          sel,
  input  logic [DW-1:0] btf    [4],
  output logic [DW-1:0] ram_in [4]
);
  logic [DW-1:0] reg2, reg3;

  always_ff @(posedge clk) begin
    reg2 <= btf[2];
    reg3 <= btf[3];
  end

  always_comb begin
    if (!sel) begin
      ram_in[0] = btf[0];
      ram_in[1] = btf[1];
      ram_in[2] = reg2;
      ram_in[3] = reg3;
    end else begin
      ram_in[0] = reg2;
      ram_in[1] = reg3;
      ram_in[2] = btf[0];
      ram_in[3] = btf[1];
    end
  end
endmodule
