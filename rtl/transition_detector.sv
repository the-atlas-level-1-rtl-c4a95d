// transition_detector: detects data transitions at a sampling phase.
//
// The same input is sampled through a master and a slave delay path whose
// delays differ by one tap (78.125 ps). Where master and slave samples differ
// (XOR), a data edge lies between the two sampling instants. Two match ports
// are watched at a time: stage 0 watches Q1 and Q2, stage 1 watches Q3 and
// Q4. Each port's status bit is set by clr and latched low the first time
// its master and slave samples differ while en is high, so a status of 1
// after a measuring interval means "no transition seen at this phase".
//
// Timing: master/slave are sampled at every edge with en high; status
// changes on that edge. clr has priority over en.
module transition_detector
  import ber_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           en,
  input  logic           stage,
  input  logic [N_Q-1:0] master,
  input  logic [N_Q-1:0] slave,
  output logic [1:0]     status
);

  logic [1:0] match;

  always_comb begin
    if (stage) match = ~(master[3:2] ^ slave[3:2]);
    else       match = ~(master[1:0] ^ slave[1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   status <= 2'b11;
    else if (clr) status <= 2'b11;
    else if (en)  status <= status & match;
  end

endmodule
