// tb_ldpc_llr_ram: self-checking test of the channel-LLR RAM.
//
// The bench writes a full frame of random LLRs, one per clock, reads random
// addresses and checks the registered data against a shadow array, checks that
// the output holds while en is low, and overwrites part of the frame while
// reading other entries.
module tb_ldpc_llr_ram;
  import ldpc_pkg::*;

  localparam int D = N;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we = 0, en = 0;
  logic [11:0] waddr = '0, raddr = '0;
  logic [5:0]  din = '0, dout;

  ldpc_llr_ram dut (.*);

  int checks = 0, failures = 0;
  logic [5:0] shadow [D];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [5:0] got, logic [5:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int a, w;
    logic [5:0] h;
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      we = 1; waddr = 12'(i); din = 6'($urandom);
      shadow[i] = din;
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 3000; n++) begin
      a = int'($urandom % D);
      en = 1; raddr = 12'(a);
      @(negedge clk);
      check(dout, shadow[a], "read");
    end
    h = dout;
    en = 0; raddr = 12'($urandom % D);
    repeat (3) @(negedge clk);
    check(dout, h, "hold");
    for (int n = 0; n < 1000; n++) begin
      a = int'($urandom % D);
      w = (a + 1 + int'($urandom % (D - 1))) % D;
      en = 1; raddr = 12'(a);
      we = 1; waddr = 12'(w); din = 6'($urandom);
      @(negedge clk);
      check(dout, shadow[a], "read during write");
      shadow[w] = din;
    end
    we = 0;
    for (int i = 0; i < D; i++) begin
      en = 1; raddr = 12'(i);
      @(negedge clk);
      check(dout, shadow[i], "final read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
