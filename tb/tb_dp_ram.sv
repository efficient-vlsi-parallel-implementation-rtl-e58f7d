// tb_dp_ram: random reads and writes on both ports of the 16K x 5 RAM,
// checked against a model array. Reads must return the word one clock
// later (old contents when the other port writes the same word in that
// cycle). The ports never write the same word in one cycle.
module tb_dp_ram;
  logic clk = 1'b0;
  logic a_en, a_we, b_en, b_we;
  logic [13:0] a_addr, b_addr;
  logic [4:0] a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  dp_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [4:0] model [16384];
  logic [4:0] exp_a, exp_b;
  logic       chk_a, chk_b;

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0;
    a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    chk_a = 0; chk_b = 0;
    // fill everything through both ports
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 14'(i);        a_wdata = 5'($urandom);
      b_en = 1; b_we = 1; b_addr = 14'(i + 8192); b_wdata = 5'($urandom);
      model[i] = a_wdata;
      model[i + 8192] = b_wdata;
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (chk_a) begin
        checks++;
        if (a_rdata !== exp_a) begin failures++; if (failures < 10) $display("A read %b expected %b", a_rdata, exp_a); end
      end
      if (chk_b) begin
        checks++;
        if (b_rdata !== exp_b) begin failures++; if (failures < 10) $display("B read %b expected %b", b_rdata, exp_b); end
      end
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = 14'($urandom % 64); a_wdata = 5'($urandom);
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = 14'($urandom % 64); b_wdata = 5'($urandom);
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) b_we = 0;
      chk_a = a_en && !a_we;
      chk_b = b_en && !b_we;
      exp_a = model[a_addr];
      exp_b = model[b_addr];
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
    end
    @(negedge clk);
    a_en = 0; b_en = 0;
    // read back everything
    for (int i = 0; i < 16384; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (a_rdata !== model[i - 1]) begin failures++; if (failures < 10) $display("final %0d: %b expected %b", i - 1, a_rdata, model[i - 1]); end
      end
      a_en = 1; a_we = 0; a_addr = 14'(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
