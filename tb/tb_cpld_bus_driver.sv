// tb_cpld_bus_driver: self-checking test of the CPLD bus driver. Random values on
// all inputs; checks that control and address lines are forwarded, that with
// RnW = 1 board data reach the FPGA side and the board side is released, and that
// with RnW = 0 FPGA data reach the board and the FPGA side is released.
module tb_cpld_bus_driver;
  logic        busclk_f, nreset_f, niosel_f, nrd_f, nwr_f, rnw;
  logic [3:0]  a_f;
  logic [1:0]  a_sub_f;
  logic [2:0]  a_bank_f;
  logic [15:0] d_f_in, d_f_out, d_a_in, d_a_out;
  logic        d_f_oe, d_a_oe;
  logic        busclk_a, nreset_a, niosel_a, nrd_a, nwr_a;
  logic [3:0]  a_a;
  logic [1:0]  a_sub_a;
  logic [2:0]  a_bank_a;
  int checks = 0, failures = 0;

  cpld_bus_driver dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      {busclk_f, nreset_f, niosel_f, nrd_f, nwr_f, rnw} = 6'($urandom);
      a_f = 4'($urandom); a_sub_f = 2'($urandom); a_bank_f = 3'($urandom);
      d_f_in = 16'($urandom); d_a_in = 16'($urandom);
      #10;
      check({busclk_a, nreset_a, niosel_a, nrd_a, nwr_a} ==
            {busclk_f, nreset_f, niosel_f, nrd_f, nwr_f}, "control lines forwarded");
      check(a_a == a_f && a_sub_a == a_sub_f && a_bank_a == a_bank_f, "address forwarded");
      if (rnw) begin
        check(d_f_oe && !d_a_oe, "read: drive FPGA side only");
        check(d_f_out == d_a_in, "read: board data to FPGA");
      end else begin
        check(!d_f_oe && d_a_oe, "write: drive board side only");
        check(d_a_out == d_f_in, "write: FPGA data to board");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
