// mem_model: behavioural main memory for the testbenches (not part of the
// design). Whole-line reads and writes over a valid/ready request port.
// Writes are stored at once; a read is answered with a one-cycle rsp_valid
// LAT edges after the edge that took it, and the port is busy meanwhile.
// A line never written holds a fixed pattern derived from its address
// (init_line), so every line has known contents without preloading.
module mem_model #(
  parameter int unsigned LAW = 26,
  parameter int unsigned LB  = 512,
  parameter int unsigned LAT = 100
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req_valid_i,
  output logic           req_ready_o,
  input  logic           req_we_i,
  input  logic [LAW-1:0] req_addr_i,
  input  logic [LB-1:0]  req_wdata_i,
  output logic           rsp_valid_o,
  output logic [LB-1:0]  rsp_rdata_o
);

  logic [LB-1:0] mem [logic [LAW-1:0]];
  logic          busy;
  int unsigned   cnt;
  logic [LAW-1:0] raddr;
  int unsigned   n_reads, n_writes;

  function automatic logic [LB-1:0] init_line(input logic [LAW-1:0] a);
    logic [LB-1:0] l;
    for (int i = 0; i < int'(LB / 32); i++)
      l[i * 32 +: 32] = 32'(a) * 32'h9E3779B1 + 32'(i) * 32'h7F4A7C15;
    return l;
  endfunction

  function automatic logic [LB-1:0] peek(input logic [LAW-1:0] a);
    return mem.exists(a) ? mem[a] : init_line(a);
  endfunction

  function automatic void store(input logic [LAW-1:0] a, input logic [LB-1:0] d);
    mem[a] = d;
  endfunction

  assign req_ready_o = !busy;
  assign rsp_valid_o = busy && (cnt == 0);
  assign rsp_rdata_o = rsp_valid_o ? peek(raddr) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      cnt      <= 0;
      raddr    <= '0;
      n_reads  <= 0;
      n_writes <= 0;
    end else if (busy) begin
      if (cnt == 0) busy <= 1'b0;
      else          cnt  <= cnt - 1;
    end else if (req_valid_i) begin
      if (req_we_i) begin
        store(req_addr_i, req_wdata_i);
        n_writes        <= n_writes + 1;
      end else begin
        busy    <= 1'b1;
        cnt     <= LAT - 1;
        raddr   <= req_addr_i;
        n_reads <= n_reads + 1;
      end
    end
  end

endmodule
