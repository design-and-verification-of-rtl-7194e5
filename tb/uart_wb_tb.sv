// uart_wb_tb: self-checking test of the Wishbone slave interface.
//
// A Wishbone master in the testbench performs random single reads and
// writes, with random idle gaps and with strobes that are held after the
// acknowledge. The register side is a small memory in the testbench that
// the strobes write and read. Checks: every access produces exactly one
// strobe of the right kind, address and data; wb_ack_o comes one clock
// after the strobe and lasts one clock (two clocks per access); read data
// match the memory; and a strobe without cyc does nothing.
module uart_wb_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wb_cyc_i = 0, wb_stb_i = 0, wb_we_i = 0;
  logic [2:0] wb_adr_i = '0;
  logic [7:0] wb_dat_i = '0, wb_dat_o;
  logic wb_ack_o;
  logic reg_we, reg_re;
  logic [2:0] reg_addr;
  logic [7:0] reg_wdata, reg_rdata;
  logic [7:0] regs [8];
  logic [7:0] model [8];
  int checks = 0, failures = 0;
  int n_we = 0, n_re = 0;

  uart_wb dut (.*);

  always #5 clk = ~clk;

  assign reg_rdata = regs[reg_addr];
  always @(posedge clk) begin
    if (reg_we) begin
      regs[reg_addr] <= reg_wdata;
      n_we++;
    end
    if (reg_re) n_re++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic access(input bit we, input logic [2:0] a, input logic [7:0] d, output logic [7:0] q);
    int we0, re0, clocks;
    we0 = n_we;
    re0 = n_re;
    @(negedge clk);
    wb_cyc_i = 1; wb_stb_i = 1; wb_we_i = we; wb_adr_i = a; wb_dat_i = d;
    clocks = 0;
    do begin
      @(posedge clk);
      #1;
      clocks++;
    end while (!wb_ack_o && clocks < 10);
    check(wb_ack_o && clocks == 1, $sformatf("ack after %0d clocks", clocks));
    q = wb_dat_o;
    // keep the strobe one more clock sometimes: no second access may start
    if ($urandom_range(0, 1)) begin
      @(posedge clk);
      #1;
      check(!wb_ack_o, "ack lasts one clock");
    end
    @(negedge clk);
    wb_cyc_i = 0; wb_stb_i = 0;
    if (we) check(n_we == we0 + 1 && n_re == re0, "exactly one write strobe");
    else    check(n_re == re0 + 1 && n_we == we0, "exactly one read strobe");
    repeat ($urandom_range(0, 2)) @(posedge clk);
  endtask

  initial begin
    logic [7:0] q;
    foreach (regs[i]) begin
      regs[i] = 8'(i * 17);
      model[i] = 8'(i * 17);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      bit we;
      logic [2:0] a;
      logic [7:0] d;
      we = $urandom_range(0, 1);
      a = 3'($urandom);
      d = 8'($urandom);
      access(we, a, d, q);
      if (we) model[a] = d;
      else check(q == model[a], $sformatf("read %h from %0d, expected %h", q, a, model[a]));
    end
    // stb without cyc
    begin
      int w0, r0;
      w0 = n_we;
      r0 = n_re;
      @(negedge clk);
      wb_stb_i = 1; wb_we_i = 1;
      repeat (4) @(posedge clk);
      #1 check(!wb_ack_o && n_we == w0 && n_re == r0, "no access without cyc");
      @(negedge clk) wb_stb_i = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
