// tb_nbr_network: checks the neighbourhood network at its full size (128 PEs)
// with random operands in each of the three end configurations: every inner PE
// reads exactly its adjacent PEs, and the ring ends close on each other, on the
// CP's operand or on the boundary value. The CP reads PE0 and PE(N-1).
module tb_nbr_network;
  import simd_pkg::*;
  localparam int N = 128;
  word_t pe_opnd [N];
  word_t cp_opnd, boundary, cp_right, cp_left;
  word_t pe_left [N];
  word_t pe_right [N];
  netmode_e mode;
  int checks = 0, failures = 0;

  nbr_network #(.N_PE(N)) dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t el, er;
    for (int t = 0; t < 60; t++) begin
      for (int i = 0; i < N; i++) pe_opnd[i] = word_t'($urandom);
      cp_opnd  = word_t'($urandom);
      boundary = word_t'($urandom);
      mode     = netmode_e'(t % 3);
      #1;
      for (int i = 0; i < N; i++) begin
        if (i > 0) el = pe_opnd[i-1];
        else el = (mode == NET_RING_PE) ? pe_opnd[N-1] : (mode == NET_RING_CP) ? cp_opnd : boundary;
        if (i < N - 1) er = pe_opnd[i+1];
        else er = (mode == NET_RING_PE) ? pe_opnd[0] : (mode == NET_RING_CP) ? cp_opnd : boundary;
        chk(pe_left[i] == el, $sformatf("mode %0d PE%0d left", mode, i));
        chk(pe_right[i] == er, $sformatf("mode %0d PE%0d right", mode, i));
      end
      chk(cp_right == pe_opnd[0], "cp_right");
      chk(cp_left == pe_opnd[N-1], "cp_left");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
