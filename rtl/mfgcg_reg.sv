// mfgcg_reg: register under modified fine-grain clock gating (m-FGCG).
//
// Ordinary fine-grain clock gating gives a register bank its own clock gate
// opened by the bank's load enable. The modified scheme also opens the gate
// while reset is asserted, the reset being the additional enable pin, so a
// register with synchronous reset still receives the clock edge it needs to
// reset even when its load enable is low:
//   gate enable = en | rst ;  q <= rst ? RESET_VAL : (en ? d : q)
// The hold term keeps the register correct if the gate is bypassed.
// Interface: clk free-running, rst synchronous active high, en load enable,
// d/q data. Timing: q takes d on the clk edge where en was high.
// Following the document: the reset signal as an extra gate enable. This
// implementation's choice: synchronous reset, one gate per register.
module mfgcg_reg #(
  parameter int unsigned       W         = 32,
  parameter logic [W-1:0]      RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic gclk;

  icg_cell u_icg (.clk(clk), .en(en | rst), .gclk(gclk));

  always_ff @(posedge gclk) begin
    if (rst)     q <= RESET_VAL;
    else if (en) q <= d;
  end
endmodule
