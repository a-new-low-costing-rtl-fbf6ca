// tb_ldpc_msg_ram: self-checking test of the two-port message RAM.
//
// A shadow array is the reference. The bench fills the RAM through both
// ports at once (two writes per clock to different addresses), reads random
// addresses on both ports and checks the data one clock later, checks that the
// output register holds while en is low, that ssr makes an enabled read return
// 0 without changing the contents, and that a read and a write to the same
// address on one port return the old value (read-first).
module tb_ldpc_msg_ram;
  import ldpc_pkg::*;

  localparam int D = NEDGE;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic ssr = 0, en_a = 0, we_a = 0, en_b = 0, we_b = 0;
  logic [12:0] addr_a = '0, addr_b = '0;
  logic [5:0]  din_a = '0, din_b = '0, dout_a, dout_b;

  ldpc_msg_ram dut (.*);

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
    int a, b;
    logic [5:0] ha, hb;
    @(negedge clk);
    // fill: port A even addresses, port B odd addresses
    for (int i = 0; i < D; i += 2) begin
      en_a = 1; we_a = 1; addr_a = 13'(i);     din_a = 6'($urandom);
      en_b = 1; we_b = 1; addr_b = 13'(i + 1); din_b = 6'($urandom);
      shadow[i] = din_a; shadow[i + 1] = din_b;
      @(negedge clk);
    end
    we_a = 0; we_b = 0;
    // random reads on both ports
    for (int n = 0; n < 4000; n++) begin
      a = int'($urandom % D); b = int'($urandom % D);
      en_a = 1; addr_a = 13'(a);
      en_b = 1; addr_b = 13'(b);
      @(negedge clk);
      check(dout_a, shadow[a], "read A");
      check(dout_b, shadow[b], "read B");
    end
    // hold while en is low
    ha = dout_a; hb = dout_b;
    en_a = 0; en_b = 0;
    addr_a = 13'($urandom); addr_b = 13'($urandom);
    repeat (3) @(negedge clk);
    check(dout_a, ha, "hold A");
    check(dout_b, hb, "hold B");
    // ssr: enabled reads return 0
    ssr = 1;
    for (int n = 0; n < 200; n++) begin
      a = int'($urandom % D); b = int'($urandom % D);
      en_a = 1; addr_a = 13'(a);
      en_b = 1; addr_b = 13'(b);
      @(negedge clk);
      check(dout_a, 6'd0, "ssr A");
      check(dout_b, 6'd0, "ssr B");
    end
    ssr = 0;
    // contents survived, read-first on a write
    for (int n = 0; n < 500; n++) begin
      a = int'($urandom % D);
      b = (a + 1 + int'($urandom % (D - 1))) % D;
      en_a = 1; we_a = 1; addr_a = 13'(a); din_a = 6'($urandom);
      en_b = 1; we_b = 0; addr_b = 13'(b);
      @(negedge clk);
      check(dout_a, shadow[a], "read-first A");
      check(dout_b, shadow[b], "read B after ssr");
      shadow[a] = din_a;
    end
    we_a = 0;
    for (int n = 0; n < 500; n++) begin
      a = int'($urandom % D);
      en_a = 1; addr_a = 13'(a);
      en_b = 1; we_b = 1; addr_b = 13'((a + 7) % D); din_b = 6'($urandom);
      @(negedge clk);
      check(dout_a, shadow[a], "read A after writes");
      check(dout_b, shadow[(a + 7) % D], "read-first B");
      shadow[(a + 7) % D] = din_b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
