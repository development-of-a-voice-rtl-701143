// tb_pnc_msrag: self-checking test of the microinterrupt service routine
// address generator.  Random request vectors (and single requests) are
// applied; the selected line must be the lowest-numbered request and the
// address 512 + 16 * line.
module tb_pnc_msrag;
  logic [31:0] req;
  logic any;
  logic [4:0] idx;
  logic [9:0] addr;
  int checks = 0, failures = 0;

  pnc_msrag dut (.req, .req_any(any), .idx, .addr);

  initial begin
    req = 0; #1;
    checks++; if (any !== 1'b0) begin failures++; $display("FAIL any"); end
    for (int i = 0; i < 32; i++) begin
      req = 32'd1 << i; #1;
      checks++;
      if (!any || idx !== 5'(i) || addr !== 10'(512 + 16 * i)) begin failures++; $display("FAIL single %0d", i); end
    end
    for (int t = 0; t < 2000; t++) begin
      int e;
      req = $urandom & $urandom;
      if (t % 7 == 0) req = 32'h8000_0000 | ($urandom & 32'h0F00_0000);
      #1;
      e = -1;
      for (int i = 31; i >= 0; i--) if (req[i]) e = i;
      checks++;
      if (e < 0) begin
        if (any) begin failures++; $display("FAIL any"); end
      end else if (!any || idx !== 5'(e) || addr !== 10'(512 + 16 * e)) begin
        failures++; $display("FAIL req=%h idx=%0d exp=%0d", req, idx, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
