// i3c_ram: the controller's data buffer.
//
// Bytes to be sent to a target are written here by the CPU before a command
// starts, and bytes read from targets (and the PID bytes found during dynamic
// address assignment) are stored here for the CPU to fetch. Single port,
// synchronous: a read returns its data on the clock after the request. The
// depth covers the full 8-bit byte address used by the command word.
// Width and depth are this design's choices; the contents are not reset.
module i3c_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
