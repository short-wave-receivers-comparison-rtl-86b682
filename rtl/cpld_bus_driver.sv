// cpld_bus_driver: bus driver between the FPGA and the ADDA16 board, placed in a
// CPLD with separate supply banks on its two sides so that the board sees proper
// 5 V-tolerant levels.
//
// Address, strobes, select, reset and bus clock are forwarded unchanged from the
// FPGA side to the board side. The 16-bit data bus is bidirectional and its
// direction is set by RnW, driven by the FPGA: with RnW = 1 the board's data are
// driven towards the FPGA and the board-side pins are released; with RnW = 0 the
// FPGA's data are driven onto the board and the FPGA-side pins are released. Each
// tri-state pin group is represented by its data and an active-high drive enable
// (the pad buffers sit outside this module). Purely combinational, no added
// latency. The forwarding and the RnW rule are the document's; the enable-based
// representation of the tri-state pins is this design's.
module cpld_bus_driver (
  // FPGA side
  input  logic        busclk_f,
  input  logic        nreset_f,
  input  logic        niosel_f,
  input  logic        nrd_f,
  input  logic        nwr_f,
  input  logic [3:0]  a_f,
  input  logic [1:0]  a_sub_f,
  input  logic [2:0]  a_bank_f,
  input  logic        rnw,
  input  logic [15:0] d_f_in,     // data arriving from the FPGA pins
  output logic [15:0] d_f_out,    // data driven towards the FPGA
  output logic        d_f_oe,     // 1: CPLD drives the FPGA-side data pins
  // ADDA16 side
  output logic        busclk_a,
  output logic        nreset_a,
  output logic        niosel_a,
  output logic        nrd_a,
  output logic        nwr_a,
  output logic [3:0]  a_a,
  output logic [1:0]  a_sub_a,
  output logic [2:0]  a_bank_a,
  input  logic [15:0] d_a_in,     // data arriving from the board
  output logic [15:0] d_a_out,    // data driven towards the board
  output logic        d_a_oe      // 1: CPLD drives the board-side data pins
);

  assign busclk_a = busclk_f;
  assign nreset_a = nreset_f;
  assign niosel_a = niosel_f;
  assign nrd_a    = nrd_f;
  assign nwr_a    = nwr_f;
  assign a_a      = a_f;
  assign a_sub_a  = a_sub_f;
  assign a_bank_a = a_bank_f;

  // data direction
  assign d_f_oe  = rnw;
  assign d_f_out = rnw ? d_a_in : 16'h0000;
  assign d_a_oe  = !rnw;
  assign d_a_out = rnw ? 16'h0000 : d_f_in;

endmodule
