// msg_ram -- simple dual-port memory used for every store of the decoder (memory banks,
// edge-message memory, window buffers, input memories).
//
// One write port and one read port on the same clock. The read is synchronous: the word at
// rd_addr appears on rd_data one clock later. When a write and a read hit the same address in
// the same cycle, the read returns the new data (write-first). The decoder relies on this to
// see an a-posteriori sum written by the previous trellis section without a stall. Contents are
// not reset; the decoder initialises every word before reading it. The port style suits FPGA
// block RAM, on which the document's decoder is built.
module msg_ram #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             re,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    if (re) rd_data <= (we && wr_addr == rd_addr) ? wr_data : mem[rd_addr];
  end

endmodule
