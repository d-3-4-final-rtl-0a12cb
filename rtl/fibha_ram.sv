// fibha_ram: on-chip buffer used as the per-engine weight buffer and bias buffer.
//
// A plain array of DEPTH words of WIDTH bits with one synchronous write port and one
// combinational read port, so an engine can consume a fresh word every cycle without a
// read-latency bubble. Each FiBHA engine owns one for its weights (one word holds the
// PAR weights used by its PAR lanes in one cycle) and one for its per-channel biases.
// The buffer is loaded by the host (SESL engines) or by the SEML weight fetcher.
// Contents are not reset; they are valid once written.
// That every engine has its own weight buffer follows the accelerator description; the
// word organisation and the port timing are this design's.
module fibha_ram #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
