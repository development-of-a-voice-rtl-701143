// tb_mem_interface: self-checking test of the Processor Node memory
// interface: word address formation from each high-nibble source, byte
// select, operation and write-data registering, and the read-data merge
// from the module that answers.
module tb_mem_interface;
  import pn_pkg::*;
  logic clk = 0, rst = 1;
  logic [15:0] dbus = 0, m_wdata, rdata;
  mop_e op = MOP_NONE, m_op;
  logic [1:0] nsel = 0;
  logic [3:0] mmu_nib = 0, bio_nib = 0;
  logic hi_we = 0, wd_we = 0, m_bsel, m_wstb;
  logic [18:0] m_addr;
  logic [3:0] rv = 0;
  logic [3:0][15:0] rd = '0;
  int checks = 0, failures = 0;

  mem_interface dut (.clk, .rst, .dbus, .op, .nib_sel(nsel), .mmu_nib, .bio_nib, .hi_we, .wdata_we(wd_we),
                     .m_addr, .m_op, .m_bsel, .m_wdata, .m_wstb, .m_rvalid(rv), .m_rdata(rd), .rdata);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [3:0] hreg;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    hreg = 0;
    for (int t = 0; t < 400; t++) begin
      logic [3:0] n; logic [15:0] a;
      if (t % 4 == 0) begin
        dbus = 16'($urandom); hi_we = 1; @(posedge clk); #1 hi_we = 0; hreg = dbus[3:0];
      end
      nsel = 2'($urandom); mmu_nib = 4'($urandom); bio_nib = 4'($urandom);
      a = 16'($urandom); dbus = a;
      op = mop_e'($urandom_range(1, 3));
      case (nsel) 0: n = hreg; 1: n = mmu_nib; 2: n = bio_nib; default: n = 0; endcase
      @(posedge clk); #1;
      checks++;
      if (m_addr !== {n, a[15:1]} || m_bsel !== a[0] || m_op !== op) begin
        failures++; $display("FAIL addr %h exp %h", m_addr, {n, a[15:1]});
      end
      op = MOP_NONE; dbus = 16'($urandom); wd_we = 1;
      @(posedge clk); #1 wd_we = 0;
      checks++;
      if (m_op !== MOP_NONE || !m_wstb || m_wdata !== dbus) begin failures++; $display("FAIL wdata"); end
      begin
        int k; k = $urandom_range(0, 3);
        rd = '0; rv = 0; rd[k] = 16'($urandom); rv[k] = 1; #1;
        checks++;
        if (rdata !== rd[k]) begin failures++; $display("FAIL rdata"); end
        rv = 0; #1;
        checks++;
        if (rdata !== 0) begin failures++; $display("FAIL rdata idle"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
