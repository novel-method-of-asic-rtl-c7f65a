// i3c_ram_ctrl: shares the single-port data RAM between its two users.
//
// Port A belongs to the APB register block (the CPU side) and port B to the
// central controller. When both ask in the same clock, port A wins: the CPU
// access is treated as the more critical one, as in the controller's RAM
// controller. A request (req, we, addr, wdata) is accepted in the clock where
// gnt is high; for a read, rvalid pulses one clock later with the byte in
// rdata. A port that is not granted keeps its request up and retries.
// Port B also sees `overflow` when it addresses a byte beyond the RAM.
module i3c_ram_ctrl #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // port A: APB register block (priority)
  input  logic          a_req,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic          a_gnt,
  output logic          a_rvalid,
  output logic [DW-1:0] a_rdata,
  // port B: central controller
  input  logic          b_req,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic          b_gnt,
  output logic          b_rvalid,
  output logic [DW-1:0] b_rdata,
  // RAM
  output logic          ram_en,
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  output logic [DW-1:0] ram_wdata,
  input  logic [DW-1:0] ram_rdata
);

  assign a_gnt = a_req;
  assign b_gnt = b_req && !a_req;

  always_comb begin
    ram_en    = a_req || b_req;
    ram_we    = a_req ? a_we    : b_we;
    ram_addr  = a_req ? a_addr  : b_addr;
    ram_wdata = a_req ? a_wdata : b_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_rvalid <= 1'b0;
      b_rvalid <= 1'b0;
    end else begin
      a_rvalid <= a_gnt && !a_we;
      b_rvalid <= b_gnt && !b_we;
    end
  end

  assign a_rdata = ram_rdata;
  assign b_rdata = ram_rdata;

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) !(a_gnt && b_gnt));

endmodule
