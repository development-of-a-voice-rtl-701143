// tb_boot_rom_ctrl: self-checking test of the boot ROM word access.
// A behavioural EPROM (contents a fixed function of the address) answers
// the byte reads; each word must be {even byte, odd byte} and must take
// 16 clocks (2 microseconds at 8 MHz).
module tb_boot_rom_ctrl;
  logic clk = 0, rst = 1;
  logic start = 0;
  logic [10:0] wa = 0;
  logic [11:0] ra;
  logic oe, busy, done;
  logic [7:0] rd;
  logic [15:0] word;
  int checks = 0, failures = 0;

  boot_rom_ctrl dut (.clk, .rst, .start, .word_addr(wa), .rom_addr(ra), .rom_oe(oe),
                     .rom_data(rd), .word, .busy, .done);
  eprom_model #(.ABITS(12)) u_rom (.addr(ra), .oe, .data(rd));

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 50; t++) begin
      int cyc;
      wa = 11'($urandom); start = 1;
      @(posedge clk); #1 start = 0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (word !== {eprom_model_byte({wa, 1'b0}), eprom_model_byte({wa, 1'b1})}) begin
        failures++; $display("FAIL word %h", word);
      end
      checks++;
      // clock edges from the one that takes start to the one that sets done
      if (cyc - 1 != 16) begin failures++; $display("FAIL cycles %0d", cyc); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] eprom_model_byte(logic [11:0] a);
    return 8'(a * 37 + (a >> 5));
  endfunction
endmodule
