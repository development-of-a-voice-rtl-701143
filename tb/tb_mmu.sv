// tb_mmu: self-checking test of the memory management unit.
// Writes relocation and protection words into random SARs through the Data
// bus, then checks address translation (page add, high nibble, access type),
// the ASAR OR-ing, the segment FF to segment 0 mapping, the ROM window, the
// protection PLA for every access kind and page limit, and the Address
// Register path with its branch bits.
module tb_mmu;
  import pn_pkg::*;
  logic clk = 0, rst = 1;
  logic [23:0] cpu_va = 0;
  logic cpu_rw = 1, cpu_user = 0, use_ar = 0, sar_prot = 0;
  logic [15:0] dbus = 0, sar_q, ar_q, asar_q;
  logic ar_we = 0, asar_we = 0, sar_we = 0;
  logic [3:0] ar_branch;
  logic [19:0] pa;
  acc_e acc;
  logic viol;
  int checks = 0, failures = 0;
  logic [15:0] rel [512], prot [512];

  mmu dut (.clk, .rst, .cpu_va, .cpu_rw, .cpu_user, .use_ar, .sar_prot, .dbus, .ar_we, .asar_we,
           .sar_we, .sar_q, .ar_q, .asar_q, .ar_branch, .pa, .acc, .prot_violation(viol));

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic wr_sar(int idx, logic half, logic [15:0] v);
    // PNC takes the address lines, loads AR (segment bits) and ASAR
    use_ar = 1;
    dbus = {idx[7:0], 8'h00}; ar_we = 1; @(posedge clk); #1 ar_we = 0;
    dbus = 16'(idx & 9'h100); asar_we = 1; @(posedge clk); #1 asar_we = 0;
    sar_prot = half; dbus = v; sar_we = 1; @(posedge clk); #1 sar_we = 0; sar_prot = 0;
    use_ar = 0;
  endtask

  task automatic set_asar(logic [15:0] v);
    dbus = v; asar_we = 1; @(posedge clk); #1 asar_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 512; i++) begin
      rel[i]  = 16'($urandom) & 16'hFF3F;   // bits 7:6 = 00: local
      if (i % 5 == 1) rel[i][7:6] = 2'b01;
      if (i % 5 == 2) rel[i][7:6] = 2'b10;
      prot[i] = 16'($urandom);
      wr_sar(i, 0, rel[i]);
      wr_sar(i, 1, prot[i]);
    end
    for (int asp = 0; asp < 2; asp++) begin
      set_asar(16'(asp * 256));
      for (int t = 0; t < 500; t++) begin
        logic [7:0] seg; int idx; logic [19:0] epa; acc_e eacc; logic allowed, ev;
        seg = 8'($urandom_range(0, 254));
        cpu_va = {seg, 16'($urandom)};
        cpu_rw = 1'($urandom); cpu_user = 1'($urandom);
        idx = asp * 256 + seg;
        sar_prot = 0; #1;
        epa = {rel[idx][3:0], rel[idx][15:8] + cpu_va[15:8], cpu_va[7:0]};
        case (rel[idx][7:6]) 2'b00: eacc = ACC_LOCAL; 2'b01: eacc = ACC_REMOTE; default: eacc = ACC_IO; endcase
        checks++;
        if (pa !== epa || acc !== eacc || sar_q !== rel[idx]) begin
          failures++; $display("FAIL xlate va=%h pa=%h exp=%h acc=%0d", cpu_va, pa, epa, acc);
        end
        sar_prot = 1; #1;
        case ({cpu_user, cpu_rw}) 2'b01: allowed = prot[idx][0]; 2'b00: allowed = prot[idx][1];
          2'b11: allowed = prot[idx][2]; default: allowed = prot[idx][3]; endcase
        ev = !allowed || (cpu_va[15:8] > prot[idx][15:8]);
        checks++;
        if (viol !== ev) begin failures++; $display("FAIL prot va=%h", cpu_va); end
        sar_prot = 0;
      end
    end
    set_asar(0);
    // segment FF: physical segment zero, ROM window and vectors
    cpu_va = 24'hFF1234; #1; checks++;
    if (pa !== 20'h01234 || acc !== ACC_SEG0) begin failures++; $display("FAIL segFF"); end
    cpu_va = 24'hFF8ABC; #1; checks++;
    if (pa !== 20'h08ABC || acc !== ACC_ROM) begin failures++; $display("FAIL rom"); end
    cpu_va = 24'hFF0006; #1; checks++;
    if (acc !== ACC_ROM) begin failures++; $display("FAIL vectors"); end
    sar_prot = 1; #1; checks++;
    if (viol !== 1'b0) begin failures++; $display("FAIL segFF prot"); end
    sar_prot = 0;
    // Address Register path and branch bits
    use_ar = 1; dbus = 16'h0A5B; ar_we = 1; @(posedge clk); #1 ar_we = 0;
    checks++;
    if (ar_branch !== 4'hB || ar_q !== 16'h0A5B ||
        pa !== {rel[10][3:0], 8'(rel[10][15:8] + 8'h5B), 8'h00}) begin
      failures++; $display("FAIL AR path pa=%h", pa);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
