// uart_rx_tb: self-checking test of the receiver shift register.
//
// The testbench makes the baud clock (a bclk pulse every DIV clocks) and
// drives RXD itself with frames whose bit time is 16 * DIV clocks and
// whose start is placed at a random phase against bclk. For every LCR
// format it sends random characters and compares each delivered
// character and its parity / framing / break flags with what was sent.
// It injects parity errors (flipped parity bit), framing errors (stop bit
// 0) and breaks (line low for a whole frame), sends a short low glitch
// that must be rejected as a false start bit, and checks the latency: a
// character is delivered in the middle of its first stop bit, within one
// bclk period plus the synchroniser delay.
module uart_rx_tb
  import uart_pkg::*;
;
  localparam int DIV = 4;
  localparam int BIT = 16 * DIV;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bclk = 1'b0;
  lcr_t lcr = '0;
  logic rxd = 1'b1;
  logic rx_push, rx_pe, rx_fe, rx_bi, busy;
  logic [7:0] rx_data;
  int checks = 0, failures = 0;
  int div_cnt = 0;
  int pushes = 0;
  int n_pe = 0, n_fe = 0, n_bi = 0;
  longint unsigned cyc = 0;
  longint unsigned push_cyc;
  logic [7:0] got_data;
  logic got_pe, got_fe, got_bi;

  uart_rx dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    cyc     <= cyc + 1;
    div_cnt <= (div_cnt == DIV - 1) ? 0 : div_cnt + 1;
    bclk    <= (div_cnt == DIV - 1);
  end

  always @(posedge clk) if (rx_push) begin
    pushes++;
    push_cyc = cyc;
    got_data = rx_data;
    got_pe = rx_pe;
    got_fe = rx_fe;
    got_bi = rx_bi;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic hold(input logic v, input int clocks);
    @(negedge clk) rxd = v;
    repeat (clocks - 1) @(negedge clk);
  endtask

  // send one frame; err: 0 none, 1 bad parity, 2 bad stop, 3 break
  task automatic send(input logic [7:0] d, input lcr_t f, input int err);
    int n;
    bit p, par;
    longint unsigned t0;
    int n_before;
    logic [7:0] exp;
    n = 5 + int'(f.wls);
    exp = d & (8'hFF >> (8 - n));
    if (err == 3) exp = 8'h00;
    p = 0;
    for (int i = 0; i < n; i++) p ^= exp[i];
    par = f.sp ? !f.eps : (f.eps ? p : !p);
    if (err == 1) par = !par;
    // random phase against bclk
    repeat ($urandom_range(0, DIV)) @(negedge clk);
    n_before = pushes;
    @(negedge clk);
    t0 = cyc;
    if (err == 3) begin
      hold(1'b0, BIT * (2 + n + (f.pen ? 1 : 0)));
    end else begin
      hold(1'b0, BIT);
      for (int i = 0; i < n; i++) hold(exp[i], BIT);
      if (f.pen) hold(par, BIT);
      if (err == 2) hold(1'b0, BIT);
    end
    hold(1'b1, f.stb ? 2 * BIT : BIT);
    hold(1'b1, BIT);
    check(pushes == n_before + 1, $sformatf("one character delivered (%0d)", pushes - n_before));
    check(got_data == exp, $sformatf("data %h expected %h (fmt %h err %0d)", got_data, exp, f, err));
    check(got_pe == (err == 1), $sformatf("parity flag %b (err %0d)", got_pe, err));
    check(got_fe == (err >= 2), $sformatf("framing flag %b (err %0d)", got_fe, err));
    check(got_bi == (err == 3), $sformatf("break flag %b (err %0d)", got_bi, err));
    // delivered in the middle of the stop bit (sync 2 clocks + bclk phase)
    begin
      longint unsigned ideal, lat;
      ideal = t0 + longint'((1 + n + (f.pen ? 1 : 0)) * BIT + BIT / 2);
      lat = push_cyc;
      check(lat + DIV + 2 >= ideal && lat <= ideal + DIV + 4,
            $sformatf("latency %0d, ideal %0d", lat - t0, ideal - t0));
    end
    n_pe += (err == 1);
    n_fe += (err == 2);
    n_bi += (err == 3);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5 * BIT) @(posedge clk);
    for (int wls = 0; wls < 4; wls++)
      for (int stb = 0; stb < 2; stb++)
        for (int par = 0; par < 5; par++) begin
          lcr_t f;
          f = '0;
          f.wls = 2'(wls);
          f.stb = 1'(stb);
          f.pen = (par != 0);
          f.eps = (par == 2 || par == 4);
          f.sp  = (par >= 3);
          @(negedge clk) lcr = f;
          for (int k = 0; k < 3; k++) send(8'($urandom), f, 0);
          if (f.pen && !f.sp) send(8'($urandom), f, 1);
          send(8'($urandom), f, 2);
          send(8'($urandom), f, 3);
        end
    // false start: a glitch shorter than half a bit is rejected
    begin
      int n_before;
      n_before = pushes;
      hold(1'b0, BIT / 4);
      hold(1'b1, 3 * BIT);
      check(pushes == n_before && !busy, "glitch rejected");
    end
    check(n_pe > 0 && n_fe > 0 && n_bi > 0, "all error kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
