// tb_field_ram: random writes and reads against an array model. A read
// returns its word one clock after the address; a read of the address being
// written in the same clock returns the old word.
module tb_field_ram;
  localparam int AW = 6, W = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [2**AW];
  int checks = 0, failures = 0, collisions = 0;

  field_ram #(.AW(AW), .W(W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expect_q;
    logic have;
    have = 0;
    we = 1; raddr = 0;
    // fill
    for (int a = 0; a < 2**AW; a++) begin
      waddr = AW'(a); wdata = W'($urandom); model[a] = wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      we = 1'($urandom); waddr = AW'($urandom); wdata = W'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom);
      if (we && raddr == waddr) collisions++;
      expect_q = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("read %0d: got %h expected %h", raddr, rdata, expect_q);
      end
    end
    checks++;
    if (collisions == 0) begin failures++; $display("no read/write collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
