// fibha_pingpong_buf: double buffer placed between two FiBHA engines, and between the
// SESL and SEML parts of the accelerator.
//
// Two banks of DEPTH pixel vectors (WIDTH bits each, one INT8 per channel). The producer
// fills the bank selected by its own pointer and pulses wr_commit when the tile is
// complete; the bank then belongs to the consumer, which reads it with random access and
// pulses rd_release when done. Producer and consumer therefore work on different tiles
// at the same time, and a full buffer (both banks committed) stalls the producer through
// wr_ready. Reads are combinational; writes and the bank hand-over take effect on the
// next clock edge. Both pointers and both "full" flags reset to empty.
// Double buffering between engines and between the two parts follows the accelerator
// description; the commit/release hand-over and combinational reads are this design's.
module fibha_pingpong_buf #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // producer side
  output logic             wr_ready,    // a free bank is available
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             wr_commit,   // current bank is complete, hand it over
  // consumer side
  output logic             rd_valid,    // a complete bank is available
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             rd_release   // current bank consumed, free it
);

  logic [WIDTH-1:0] mem [2][DEPTH];
  logic [1:0]       full;
  logic             wsel, rsel;

  assign wr_ready = !full[wsel];
  assign rd_valid = full[rsel];
  assign rdata    = (32'(raddr) < DEPTH) ? mem[rsel][raddr] : '0;

  always_ff @(posedge clk) begin
    if (we && wr_ready && (32'(waddr) < DEPTH)) mem[wsel][waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0;
      wsel <= 1'b0;
      rsel <= 1'b0;
    end else begin
      logic [1:0] nfull;
      nfull = full;
      if (wr_commit && wr_ready) begin
        nfull[wsel] = 1'b1;
        wsel <= !wsel;
      end
      if (rd_release && rd_valid) begin
        nfull[rsel] = 1'b0;
        rsel <= !rsel;
      end
      full <= nfull;
    end
  end

  // Handshake rules: nothing is written or committed into a bank the consumer owns,
  // and only a complete bank is released.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n) !(we && !wr_ready))
    else $error("pingpong: write while no free bank");
  a_no_commit_when_full: assert property (@(posedge clk) disable iff (!rst_n) !(wr_commit && !wr_ready))
    else $error("pingpong: commit while no free bank");
  a_no_release_when_empty: assert property (@(posedge clk) disable iff (!rst_n) !(rd_release && !rd_valid))
    else $error("pingpong: release while no full bank");

endmodule
