// tb_field_memory: writes go to all three copies at once, so reading the
// three copies at three different addresses must return the three words
// written there; the PML split memory is written separately and read at the
// first address. Checked against an array model, one clock read latency.
module tb_field_memory;
  import fdtd_pkg::*;
  localparam int AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          we, split_we;
  logic [AW-1:0] waddr;
  field_t        wdata, split_wdata;
  logic [AW-1:0] raddr [3];
  field_t        rdata [3];
  field_t        split_rdata;
  field_t        mf [2**AW], ms [2**AW];
  int checks = 0, failures = 0;

  field_memory #(.AW(AW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    field_t ef [3], es;
    for (int m = 0; m < 3; m++) raddr[m] = '0;
    we = 1; split_we = 1;
    for (int a = 0; a < 2**AW; a++) begin
      waddr = AW'(a); wdata = field_t'($urandom); split_wdata = field_t'($urandom);
      mf[a] = wdata; ms[a] = split_wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); split_we = 1'($urandom);
      waddr = AW'($urandom); wdata = field_t'($urandom); split_wdata = field_t'($urandom);
      for (int m = 0; m < 3; m++) begin
        raddr[m] = AW'($urandom);
        ef[m] = mf[raddr[m]];
      end
      es = ms[raddr[0]];
      @(posedge clk);
      if (we) mf[waddr] = wdata;
      if (split_we) ms[waddr] = split_wdata;
      #1;
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (rdata[m] !== ef[m]) begin
          failures++;
          if (failures < 10) $display("copy %0d: got %h expected %h", m, rdata[m], ef[m]);
        end
      end
      checks++;
      if (split_rdata !== es) begin failures++; $display("split mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
