// session_monitor: counts the sessions open at one node (0..MAX_SESS).
//
// A request (req) carries the session operation of a packet that has passed
// the other firewall checks. An open is accepted while fewer than MAX_SESS
// sessions are open and increments the count; a close is accepted while a
// session is open and decrements it; a packet with no session operation is
// always accepted. `accept` is combinational; the count changes on the next
// clock edge. Reset closes all sessions.
// The 0-31 range follows the document; refusing an open at the limit and a
// close with nothing open is this design's reading of "limited to 0-31".
// rst_n is the asynchronous reset of the registers and also appears in the
// `disable iff` of assertions; lint reports that double use, which is intended.
module session_monitor
  import noc_pkg::*;
#(
  parameter int unsigned MAX_SESS = 31
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          req,
  input  sess_e                         op,
  output logic                          accept,
  output logic [$clog2(MAX_SESS+1)-1:0] count,
  output logic                          full
);
  localparam int CW = $clog2(MAX_SESS + 1);
  logic [CW-1:0] cnt_q;

  always_comb begin
    unique case (op)
      SES_OPEN:  accept = (cnt_q < CW'(MAX_SESS));
      SES_CLOSE: accept = (cnt_q != '0);
      default:   accept = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else if (req && accept) begin
      if (op == SES_OPEN)       cnt_q <= cnt_q + 1'b1;
      else if (op == SES_CLOSE) cnt_q <= cnt_q - 1'b1;
    end
  end

  assign count = cnt_q;
  assign full  = (cnt_q == CW'(MAX_SESS));

  a_range: assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= CW'(MAX_SESS));
endmodule
