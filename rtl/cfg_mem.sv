// cfg_mem: configuration memory of one processing element.
//
// Holds up to DEPTH hardware configurations of W bits. The host loads entries
// through the write port; the master node selects one entry per clock cycle
// through the asynchronous read port, so a processing element can change its
// operating mode every cycle without disturbing the others. The depth of 16
// configurations follows the processor description; the asynchronous read
// and the host write port are this design's choices.
//
// Timing: a write is visible to a read one cycle after the write edge.
// Reset clears every entry to zero.
module cfg_mem #(
  parameter int W     = 32,
  parameter int DEPTH = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];
endmodule
