// fibha_ext_mem_model: behavioural model of the off-chip memory that holds the SEML
// weights, for simulation only.
//
// Word-addressed, PAR INT8 weights per word. A request is accepted when req and gnt are
// both high; gnt is withheld at random (about one cycle in four when GNT_RANDOM is set),
// and the data returns in order LAT cycles after acceptance on rvalid/rdata. Several
// requests may be in flight. The testbench fills 'mem' directly. Accepted requests are
// counted in n_reads.
// The published design only says the SEML weights are off chip; the protocol, random
// grant and fixed latency are this model's choices.
module fibha_ext_mem_model
  import fibha_pkg::*;
#(
  parameter int PAR = 16,
  parameter int DEPTH = 4096,
  parameter int AW = 24,
  parameter int LAT = 4,
  parameter bit GNT_RANDOM = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req,
  input  logic [AW-1:0]  addr,
  output logic           gnt,
  output logic           rvalid,
  output wgt_t [PAR-1:0] rdata
);
  wgt_t [PAR-1:0] mem [DEPTH];
  int n_reads = 0;
  longint cycle = 0;
  typedef struct { longint due; wgt_t [PAR-1:0] data; } resp_t;
  resp_t q [$];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt <= 1'b0;
      rvalid <= 1'b0;
      rdata <= '0;
      q.delete();
    end else begin
      cycle <= cycle + 1;
      if (req && gnt) begin
        resp_t r;
        r.due = cycle + LAT;
        r.data = (32'(addr) < DEPTH) ? mem[addr] : '0;
        q.push_back(r);
        n_reads <= n_reads + 1;
      end
      gnt <= GNT_RANDOM ? ($urandom_range(3) != 0) : 1'b1;
      if (q.size() > 0 && q[0].due <= cycle) begin
        rvalid <= 1'b1;
        rdata <= q[0].data;
        void'(q.pop_front());
      end else begin
        rvalid <= 1'b0;
      end
    end
  end
endmodule
