// req_arbiter: round-robin arbiter between the two cores' L2 request ports.
//
// Each core presents a request with valid and waits for ready. When both
// request, the core that was not served last wins; a core waiting alone is
// served at once. The winner's request is passed on with its core number,
// and ready is returned only to the winner. Purely combinational apart from
// the one-bit "last served" pointer, which moves when a request is taken.
// Requesters must hold a request unchanged until it is taken (checked by
// an assertion). The arbitration policy is this implementation's choice.
// Lint note: rst_n also disables that assertion, so a linter reports it as
// used both asynchronously and synchronously; this is expected.
module req_arbiter
  import wac_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned PB     = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              c_valid_i [NUM_CORES],
  output logic              c_ready_o [NUM_CORES],
  input  logic              c_we_i    [NUM_CORES],
  input  logic [ADDR_W-1:0] c_addr_i  [NUM_CORES],
  input  logic [PB-1:0]     c_wdata_i [NUM_CORES],
  output logic              valid_o,
  input  logic              ready_i,
  output logic              core_o,
  output logic              we_o,
  output logic [ADDR_W-1:0] addr_o,
  output logic [PB-1:0]     wdata_o
);

  logic last_q;   // core served last

  always_comb begin
    if (c_valid_i[0] && c_valid_i[1]) core_o = ~last_q;
    else                              core_o = c_valid_i[1];
    valid_o      = c_valid_i[0] || c_valid_i[1];
    we_o         = c_we_i[core_o];
    addr_o       = c_addr_i[core_o];
    wdata_o      = c_wdata_i[core_o];
    c_ready_o[0] = ready_i && valid_o && (core_o == 1'b0);
    c_ready_o[1] = ready_i && valid_o && (core_o == 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   last_q <= 1'b1;
    else if (valid_o && ready_i)  last_q <= core_o;
  end

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      c_valid_i[c] && !c_ready_o[c] |=> c_valid_i[c] && $stable(c_addr_i[c]) && $stable(c_we_i[c]));
  end

endmodule
