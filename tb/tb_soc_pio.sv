// tb_soc_pio: self-checking testbench of the parallel I/O peripheral, with
// one instance configured as inputs (buttons) and one as outputs (display).
// Checks the reset direction of each, that input pins are read two clocks
// after they change (two-stage synchroniser), that writes reach output pins
// at once, and a run-time change of direction on individual pins.
module tb_soc_pio;
  import wb_pkg::*;
  localparam int DAT_W = 24, W = 8;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic             cs, we, cs2, we2;
  logic [1:0]       adr;
  logic [DAT_W-1:0] wdat, rdat, rdat2;
  logic [W-1:0]     pin_in, pin_out, pin_oe, pin_out2, pin_oe2;

  int checks = 0, failures = 0;

  soc_pio #(.WIDTH(W), .DIR_RESET('0)) dut_in (
    .clk(clk), .rst(rst), .cs_i(cs), .we_i(we), .adr_i(adr), .dat_i(wdat), .dat_o(rdat),
    .pio_i(pin_in), .pio_o(pin_out), .pio_oe_o(pin_oe));
  soc_pio #(.WIDTH(W), .DIR_RESET('1)) dut_out (
    .clk(clk), .rst(rst), .cs_i(cs2), .we_i(we2), .adr_i(adr), .dat_i(wdat), .dat_o(rdat2),
    .pio_i(8'h00), .pio_o(pin_out2), .pio_oe_o(pin_oe2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v, dir, outv;
    cs = 0; we = 0; cs2 = 0; we2 = 0; adr = 0; wdat = 0; pin_in = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(pin_oe == '0 && pin_oe2 == '1, "reset directions");
    // inputs: value visible after two clocks, not after one
    for (int n = 0; n < 50; n++) begin
      v = W'($urandom);
      @(negedge clk); pin_in = v; cs = 1; adr = PIO_DATA;
      @(negedge clk); #1;
      @(negedge clk); #1;
      check(rdat == DAT_W'(v), "input pins read after synchroniser");
      pin_in = ~v;
      @(negedge clk); #1;
      check(rdat == DAT_W'(v), "input change not visible after one clock");
    end
    cs = 0;
    // outputs: write goes to the pins
    for (int n = 0; n < 50; n++) begin
      v = W'($urandom);
      @(negedge clk); cs2 = 1; we2 = 1; adr = PIO_DATA; wdat = DAT_W'(v);
      @(negedge clk); we2 = 0; #1;
      check(pin_out2 == v && rdat2 == DAT_W'(v), "output register to pins and readback");
    end
    cs2 = 0;
    // mixed directions at run time on the input instance
    dir = 8'b1010_0101; outv = 8'b1100_1100;
    @(negedge clk); cs = 1; we = 1; adr = PIO_DIR;  wdat = DAT_W'(dir);
    @(negedge clk); adr = PIO_DATA; wdat = DAT_W'(outv);
    @(negedge clk); we = 0; pin_in = 8'b0011_1010;
    @(negedge clk); @(negedge clk); #1;
    check(pin_oe == dir, "direction register drives oe");
    check(rdat == DAT_W'((dir & outv) | (~dir & 8'b0011_1010)), "mixed pin read");
    adr = PIO_DIR; #1;
    check(rdat == DAT_W'(dir), "direction readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
