// rx_frontend_model: behavioural model of one receiver input of the error
// rate test system: cable, programmable input delay lines and oversampling
// deserializer. Not synthesizable; cycle based, times in 1/8 ps.
//
// The transmitter sends two bits per 160 MHz cycle (tx[1] first, bit period
// 3.125 ns). The model keeps the transmitted bit history and, at every rising
// edge, returns for the master and the slave delay path the four samples of
// that cycle taken at k x 1.5625 ns + tap x 78.125 ps after the cycle start,
// minus the cable delay SKEW. A sample closer than JITTER to a bit edge is
// random, as a real receiver sees it near a data transition.
module rx_frontend_model #(
  parameter longint SKEW   = 2 * 50000 + 7000,  // cable + logic delay, 1/8 ps
  parameter longint JITTER = 800                // half width of the edge zone, 1/8 ps
) (
  input  logic       clk,
  input  logic [1:0] tx,
  input  logic [4:0] tap_master,
  input  logic [4:0] tap_slave,
  output logic [3:0] master,
  output logic [3:0] slave
);
  localparam longint T_CYC = 50000, T_BIT = 25000, T_Q = 12500, T_TAP = 625;

  bit hist [$];
  longint n = 0;

  function automatic bit sample(input longint t);
    longint idx, frac;
    if (t < 0) return 1'b0;
    idx  = t / T_BIT;
    frac = t % T_BIT;
    if (frac < JITTER || frac > T_BIT - JITTER) return 1'($urandom);
    if (idx >= hist.size()) return 1'b0;
    return hist[idx];
  endfunction

  initial begin master = '0; slave = '0; end

  always @(posedge clk) begin
    hist.push_back(tx[1]);
    hist.push_back(tx[0]);
    for (int k = 0; k < 4; k++) begin
      master[k] <= sample(n * T_CYC + k * T_Q + longint'(tap_master) * T_TAP - SKEW);
      slave[k]  <= sample(n * T_CYC + k * T_Q + longint'(tap_slave) * T_TAP - SKEW);
    end
    n <= n + 1;
  end
endmodule
