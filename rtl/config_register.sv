// config_register: the agent's source-port lookup table (firewall table).
//
// One bit per source port (2**SPORT_W = 32 ports): '1' means packets from
// that port are not let through to the PE. The table is written one entry at
// a time (we/waddr/wblock) and read combinationally by the control packet
// stage (raddr -> blocked). Ports set in HW_BLOCK are blocked in hardware:
// the table output is ORed with this constant, so no write can open them.
// Reset clears the writable table.
// The lookup-table idea and the hardware-blocked ports follow the document;
// which ports are hardware-blocked (HW_BLOCK) and the write port are this
// design's choices.
module config_register
  import noc_pkg::*;
#(
  parameter logic [2**SPORT_W-1:0] HW_BLOCK = 32'h8000_0000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [SPORT_W-1:0] waddr,
  input  logic               wblock,
  input  logic [SPORT_W-1:0] raddr,
  output logic               blocked,
  output logic [2**SPORT_W-1:0] table_out
);
  logic [2**SPORT_W-1:0] lut_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  lut_q        <= '0;
    else if (we) lut_q[waddr] <= wblock;
  end

  assign table_out = lut_q | HW_BLOCK;
  assign blocked   = table_out[raddr];
endmodule
