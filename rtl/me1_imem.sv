// me1_imem: instruction memory (ME1) of the master node.
//
// WORDS instructions of IW bits; the defaults 128 x 32 give the 4 Kbit
// capacity of the processor description (the word width is this design's
// choice). The host loads the program through the write port while the
// processor is idle; the master node reads the word at its program counter
// through the asynchronous read port, so an instruction can be decoded and
// issued in the cycle its address is presented. No reset: the host must load
// every word a program reaches.
module me1_imem #(
  parameter int WORDS = 128,
  parameter int IW    = 32,
  localparam int AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [IW-1:0] rdata
);
  logic [IW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
