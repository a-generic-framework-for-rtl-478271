// tb_wb_addr_decoder: self-checking testbench of the central address decoder
// with the SoC's default system address table.  Every 16-bit address is
// applied and the selected slave compared with an address map written out
// independently here as ranges.  A second instance with two overlapping
// entries checks that the lower index wins.
module tb_wb_addr_decoder;
  localparam int NS = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0]   adr;
  logic [NS-1:0] sel;
  logic [2:0]    idx;
  logic          hit;
  logic [1:0]    sel2;
  logic          idx2, hit2;

  int checks = 0, failures = 0;

  wb_addr_decoder dut (.adr_i(adr), .sel_o(sel), .idx_o(idx), .hit_o(hit));

  // entry 0: 0x1000-0x1FFF, entry 1: 0x1800-0x18FF (inside entry 0)
  wb_addr_decoder #(.ADR_W(16), .NS(2),
                    .BASE({32'h1800, 32'h1000}), .MASK({32'hFF00, 32'hF000})) dut2 (
    .adr_i(adr), .sel_o(sel2), .idx_o(idx2), .hit_o(hit2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s adr=%h", what, adr);
    end
  endtask

  function automatic int expected(input logic [15:0] a);
    if (a <= 16'h03FF)                  return 0;   // RAM
    if (a >= 16'h8004 && a <= 16'h8007) return 1;   // UART
    if (a >= 16'h8008 && a <= 16'h800B) return 2;   // timer
    if (a >= 16'h800C && a <= 16'h800F) return 3;   // buttons
    if (a >= 16'h8010 && a <= 16'h8013) return 4;   // 7-segment 0
    if (a >= 16'h8014 && a <= 16'h8017) return 5;   // 7-segment 1
    return -1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int a = 0; a < 65536; a++) begin
      adr = 16'(a);
      #1;
      e = expected(adr);
      if (e < 0) check(!hit && sel == '0, "unmapped address selects nothing");
      else       check(hit && int'(idx) == e && sel == NS'(1 << e), "slave selected");
      if (a >= 16'h1000 && a <= 16'h1FFF) check(hit2 && idx2 == 1'b0 && sel2 == 2'b01, "lower index wins");
      else                                 check(!hit2, "outside both entries");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
