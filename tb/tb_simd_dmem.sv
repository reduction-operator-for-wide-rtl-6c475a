// tb_simd_dmem: checks the single-port data memory at its full size (512 x 16).
// Writes random words to every address, reads them back in random order,
// checks the one-cycle read latency, that a write or an idle cycle leaves the
// read data unchanged, and that a disabled write does not store.
module tb_simd_dmem;
  localparam int W = 16, D = 512;
  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [8:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  simd_dmem #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic [W-1:0] held;
    int a;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 9'(i); wdata = W'($urandom); model[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      a = $urandom_range(D - 1);
      @(negedge clk);
      en = 1; we = 0; addr = 9'(a);
      @(posedge clk); #1;
      chk(rdata == model[a], $sformatf("read %0d got %h exp %h", a, rdata, model[a]));
      held = rdata;
      // a write right after must not disturb rdata
      @(negedge clk);
      en = 1; we = 1; addr = 9'($urandom_range(D - 1)); wdata = W'($urandom);
      model[addr] = wdata;
      @(posedge clk); #1;
      chk(rdata == held, "write changed read data");
      // disabled cycle: no store, rdata held
      @(negedge clk);
      en = 0; we = 1; addr = 9'(a); wdata = ~model[a];
      @(posedge clk); #1;
      chk(rdata == held, "idle cycle changed read data");
    end
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      en = 1; we = 0; addr = 9'(i);
      @(posedge clk); #1;
      chk(rdata == model[i], $sformatf("final read %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
