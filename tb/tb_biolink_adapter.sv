// tb_biolink_adapter: self-checking test of the BIOLINK I/O adapter.
// Four behavioural I/O controllers request local memory at random.  The
// test checks that grants rotate round-robin, that only one controller is
// granted at a time, that the captured address reaches the input latch and
// raises the microinterrupt, that a two-word transfer works ("next"), that
// "done" pulses the acknowledge with the output latch driven, that a PNC
// register access (PNC-driven control lines) blocks arbitration and drives
// the bus, and that a device acknowledge is captured.
module tb_biolink_adapter;
  logic clk = 0, rst = 1;
  logic [15:0] dbus = 0, in_q, ad_out, ad_in = 0;
  logic out_we = 0, ctl_we = 0, dma_uint, ack_uint, ad_oe, strobe = 0, dev_ack = 0, ack;
  logic [1:0] granted;
  logic [3:0] dma_req = 0, grant, lines;
  int checks = 0, failures = 0;

  biolink_adapter dut (.clk, .rst, .dbus, .out_we, .ctl_we, .in_q, .dma_uint, .ack_uint, .granted,
                       .ad_out, .ad_oe, .ad_in, .dma_req, .io_strobe(strobe), .dev_ack, .grant, .ack,
                       .pnc_lines(lines));

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic pnc_ctl(logic [15:0] v);
    dbus = v; ctl_we = 1; @(posedge clk); #1 ctl_we = 0;
  endtask

  initial begin
    int last, g, w;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    last = 3;
    for (int t = 0; t < 60; t++) begin
      int exp_g;
      dma_req = 4'($urandom) | 4'(1 << (t % 4));
      exp_g = -1;
      for (int k = 1; k <= 4; k++) if (exp_g < 0 && dma_req[(last + k) % 4]) exp_g = (last + k) % 4;
      w = 0;
      while (grant == 0 && w < 10) begin @(posedge clk); #1 w++; end
      chk($onehot(grant), "one grant");
      g = $clog2(grant);
      chk(g == exp_g, $sformatf("round robin got %0d exp %0d", g, exp_g));
      chk(granted == 2'(g), "granted index");
      last = g;
      // controller puts an address on the bus
      ad_in = 16'($urandom); strobe = 1; @(posedge clk); #1 strobe = 0;
      chk(in_q == ad_in && dma_uint, "address captured");
      if (t % 3 == 0) begin
        pnc_ctl(16'h0010);                 // next word
        chk(!dma_uint, "uint cleared");
        ad_in = 16'($urandom); strobe = 1; @(posedge clk); #1 strobe = 0;
        chk(in_q == ad_in && dma_uint, "data captured");
      end
      dbus = 16'($urandom); out_we = 1; @(posedge clk); #1 out_we = 0;
      pnc_ctl(16'h0060);                   // done, drive output latch
      chk(ack && ad_oe && ad_out == dut.out_latch, "ack with data");
      dma_req[g] = 0;
      @(posedge clk); #1;
      chk(grant == 0 && !ad_oe, "bus released");
    end
    // PNC register access: drive lines, no grant while they are driven
    dma_req = 4'hF;
    dbus = 16'hBEEF; out_we = 1; @(posedge clk); #1 out_we = 0;
    while (grant != 0) begin
      ad_in = 0; strobe = 1; @(posedge clk); #1 strobe = 0; pnc_ctl(16'h0020); @(posedge clk); #1;
    end
    pnc_ctl(16'h0003);
    repeat (3) begin @(posedge clk); #1; chk(grant == 0, "no grant during PNC access"); end
    chk(lines == 4'h3 && ad_oe && ad_out == 16'hBEEF, "PNC drives bus");
    dev_ack = 1; @(posedge clk); #1 dev_ack = 0;
    chk(ack_uint, "device ack captured");
    pnc_ctl(16'h0000);
    chk(!ack_uint && lines == 0, "ack cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
