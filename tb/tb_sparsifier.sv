// Testbench for sparsifier: random request patterns of varied density on a
// 256-input tree (the chip's group size) and a 32-input tree, compared with a
// reference that scans for the lowest requesting index. Also checks that
// back_en low withholds every grant while HIT still reports requests, and
// walks a full readout: clearing the granted request each step must visit
// the requesting pixels in ascending address order.
module tb_sparsifier;
  localparam int N1 = 256, A1 = 8, N2 = 32, A2 = 5;
  logic [N1-1:0] req1, grant1;
  logic [N2-1:0] req2, grant2;
  logic [A1-1:0] addr1;
  logic [A2-1:0] addr2;
  logic hit1, hit2, back_en;
  int checks = 0, failures = 0;

  sparsifier #(.N(N1), .AW(A1)) dut1 (.req(req1), .back_en, .hit(hit1), .grant(grant1), .addr(addr1));
  sparsifier #(.N(N2), .AW(A2)) dut2 (.req(req2), .back_en, .hit(hit2), .grant(grant2), .addr(addr2));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int lowest(input logic [N1-1:0] r, input int n);
    for (int i = 0; i < n; i++) if (r[i]) return i;
    return -1;
  endfunction

  task automatic compare();
    int l1, l2;
    l1 = lowest(req1, N1); l2 = lowest(req2, N2);
    check(hit1 == (l1 >= 0) && hit2 == (l2 >= 0), "HIT is the OR of requests");
    if (back_en) begin
      if (l1 >= 0) check(grant1 == (N1'(1) << l1) && addr1 == A1'(l1),
                         $sformatf("256: grant/addr %0d vs %0d", addr1, l1));
      else         check(grant1 == '0, "256: no grant without requests");
      if (l2 >= 0) check(grant2 == (N2'(1) << l2) && addr2 == A2'(l2),
                         $sformatf("32: grant/addr %0d vs %0d", addr2, l2));
      else         check(grant2 == '0, "32: no grant without requests");
    end else begin
      check(grant1 == '0 && grant2 == '0, "back_en low withholds grants");
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int dens;
      dens = $urandom_range(1, 300);
      for (int i = 0; i < N1; i++) req1[i] = ($urandom_range(0, dens) == 0);
      for (int i = 0; i < N2; i++) req2[i] = ($urandom_range(0, dens / 8) == 0);
      if (it % 50 == 0) req1 = '0;
      if (it % 37 == 0) req1 = N1'(1) << (N1 - 1);
      back_en = (it % 10 != 0);
      #1 compare();
    end
    // Two neighbouring requests (in01, in02): in01 must win
    back_en = 1'b1;
    req2 = '0; req2[1] = 1'b1; req2[2] = 1'b1;
    #1 check(addr2 == 5'd1 && grant2 == 32'h2, "in01 selected before in02");
    req1 = '0;
    for (int i = 0; i < 40; i++) req1[$urandom_range(0, N1-1)] = 1'b1;
    begin
      int last = -1;
      while (req1 != '0) begin
        #1;
        check(int'(addr1) > last, "ascending readout order");
        last = int'(addr1);
        req1 = req1 & ~grant1;
      end
      #1 check(hit1 == 1'b0, "HIT drops after the last pixel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
