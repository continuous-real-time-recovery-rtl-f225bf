// tb_filter_coeff_ram: self-checking test of the dual-clock coefficient RAM.
// Checks that the RAM reads zero before it is written, writes random words
// through port B at a slow clock, reads them back through port A at a fast
// clock one cycle after the address, and overwrites a few words while port A
// keeps reading (a filter update during operation).
module tb_filter_coeff_ram;
  localparam int AW = 6;
  localparam int CW = 16;
  logic clka = 0, clkb = 0, web = 0;
  logic [AW-1:0] addra = '0, addrb = '0;
  logic [2*CW-1:0] douta, dinb = '0;

  filter_coeff_ram #(.AW(AW), .CW(CW)) dut (.clka, .addra, .douta, .clkb, .web, .addrb, .dinb);
  always #7  clka = ~clka;
  always #16 clkb = ~clkb;

  int checks = 0, failures = 0;
  logic [2*CW-1:0] model [2**AW];

  task automatic read_all();
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clka);
      addra = AW'(a);
      @(negedge clka);   // one clka edge later the word is on douta
      checks++;
      if (douta !== model[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %h expected %h", a, douta, model[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 2**AW; a++) model[a] = '0;
    read_all();
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clkb);
      web = 1; addrb = AW'(a); dinb = $urandom; model[a] = dinb;
    end
    @(negedge clkb) web = 0;
    read_all();
    for (int a = 3; a < 2**AW; a += 7) begin
      @(negedge clkb);
      web = 1; addrb = AW'(a); dinb = $urandom; model[a] = dinb;
    end
    @(negedge clkb) web = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clka);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
