// tb_soc_ram: self-checking testbench of the 1 KByte RAM (341 words of 24
// bits).  Fills every word with random data while a shadow array in this
// file records it, then runs random reads and writes and compares each read
// (combinational, same clock) with the shadow.  Checks that a write without
// cs or without we changes nothing and that addresses 341..1023 read zero.
module tb_soc_ram;
  localparam int DAT_W = 24, DEPTH = 1024 * 8 / DAT_W;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             cs, we;
  logic [9:0]       adr;
  logic [DAT_W-1:0] wdat, rdat;
  logic [DAT_W-1:0] shadow [DEPTH];

  int checks = 0, failures = 0;

  soc_ram dut (.clk(clk), .cs_i(cs), .we_i(we), .adr_i(adr), .dat_i(wdat), .dat_o(rdat));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s adr=%0d", what, adr);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(DEPTH == 341, "1 KByte holds 341 words of 24 bits");
    cs = 0; we = 0; adr = 0; wdat = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      cs = 1; we = 1; adr = 10'(a); wdat = DAT_W'($urandom); shadow[a] = wdat;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      adr = 10'($urandom % 1024);
      wdat = DAT_W'($urandom);
      cs = 1'($urandom % 8 != 0);
      we = 1'($urandom % 3 == 0);
      #1;
      if (!cs)                 check(rdat == '0, "no data without cs");
      else if (adr >= DEPTH)   check(rdat == '0, "out of range reads zero");
      else                     check(rdat == shadow[adr], "read data");
      if (cs && we && adr < DEPTH) shadow[adr] = wdat;
    end
    @(negedge clk); cs = 0; we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      cs = 1; adr = 10'(a); #1;
      check(rdat == shadow[a], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
