// Testbench for serializer. A behavioural stand-in for the pixel group keeps
// a list of hit pixels (counter, address), presents the first one while
// back_en is high and drops it on RStrobe. A receiver decodes the serial line
// (START 010, 5-bit counter, 8-bit address in sparsified mode, no address in
// imaging mode) and compares every record, in order, with what was
// presented. Checks the rate: back-to-back records of 16 clocks (160 ns at
// 100 MHz) per hit pixel and 8 clocks per pixel in imaging mode, and that
// rd_en low holds off new records without cutting one short.
module tb_serializer;
  import vipic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic hit, imaging = 1'b0, rd_en = 1'b1, back_en, rstrobe, sdata;
  logic [CNT_W-1:0]  count_bus;
  logic [ADDR_W-1:0] addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serializer dut (.clk, .rst_n, .hit, .count_bus, .addr, .imaging, .rd_en, .back_en, .rstrobe, .sdata);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Group stand-in
  logic [12:0] pend[$];     // {count, addr}
  logic [12:0] sent[$];
  assign hit       = pend.size() > 0;
  assign count_bus = (hit && back_en) ? pend[0][12:8] : '0;
  assign addr      = (hit && back_en) ? pend[0][7:0]  : '0;
  // Pop just after the edge that captured the record (no race with the DUT)
  always @(posedge clk) if (rstrobe) begin
    #1;
    sent.push_back(imaging ? {pend[0][12:8], 8'h00} : pend[0]);
    void'(pend.pop_front());
  end

  // Receiver
  int rx_len, rx_n = 0, rx_pos = 0;
  logic [15:0] rx_sh;
  logic [12:0] recs[$];
  longint rec_start[$], cyc = 0;
  always @(negedge clk) begin
    cyc++;
    rx_len = imaging ? REC_IMAGING : REC_SPARSE;
    if (rx_pos == 0) begin
      if (sdata) begin rx_pos = 2; rx_sh = 16'b01; rec_start.push_back(cyc - 1); end
    end else begin
      rx_sh = {rx_sh[14:0], sdata};
      rx_pos++;
      if (rx_pos == rx_len) begin
        logic [15:0] r;
        r = rx_sh << (16 - rx_len);
        check(r[15:13] == START_SYM, "START symbol");
        recs.push_back(r[12:0]);
        rx_pos = 0;
      end
    end
  end

  task automatic run_batch(input int n, input logic img, input int expect_period);
    longint t0;
    #1 imaging = img;
    recs.delete(); sent.delete(); rec_start.delete();
    for (int i = 0; i < n; i++) pend.push_back({5'($urandom), 8'($urandom)});
    wait (pend.size() == 0);
    repeat (20) @(posedge clk);
    check(recs.size() == n, $sformatf("records %0d of %0d", recs.size(), n));
    for (int i = 0; i < n && i < recs.size(); i++)
      check(recs[i] == sent[i], $sformatf("record %0d: %h vs %h", i, recs[i], sent[i]));
    for (int i = 1; i < rec_start.size(); i++)
      check(rec_start[i] - rec_start[i-1] == expect_period,
            $sformatf("record spacing %0d", rec_start[i] - rec_start[i-1]));
    t0 = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check(sdata == 1'b0 && !rstrobe, "idle line is low");
    run_batch(40, 1'b0, 16);       // sparsified: 160 ns per hit pixel
    run_batch(64, 1'b1, 8);        // imaging: counter only
    // rd_en gating: hold off, then release
    imaging = 1'b0;
    recs.delete(); sent.delete(); rec_start.delete();
    rd_en = 1'b0;
    for (int i = 0; i < 5; i++) pend.push_back({5'($urandom), 8'($urandom)});
    repeat (50) @(posedge clk); #1;
    check(recs.size() == 0 && pend.size() == 5 && back_en == 1'b0, "rd_en low holds readout");
    rd_en = 1'b1;
    repeat (5) @(posedge clk); #1;
    rd_en = 1'b0;               // mid-record: current record must finish
    repeat (40) @(posedge clk); #1;
    check(recs.size() == 1 && pend.size() == 4, "record in flight completes, no new one");
    rd_en = 1'b1;
    wait (pend.size() == 0);
    repeat (20) @(posedge clk);
    check(recs.size() == 5, "all records after release");
    for (int i = 0; i < recs.size(); i++) check(recs[i] == sent[i], "gated record content");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
