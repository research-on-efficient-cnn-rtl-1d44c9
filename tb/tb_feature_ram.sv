// tb_feature_ram: random reads and half-word writes on both ports against a
// reference array, checking the one-cycle read latency, half enables, and
// that two adjacent words read together give four neighbouring values.
module tb_feature_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en = 0, b_en = 0;
  logic [1:0] a_we = 0, b_we = 0;
  logic [5:0] a_addr = 0, b_addr = 0;
  logic [15:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [15:0] model [64];
  int checks = 0, failures = 0;

  feature_ram #(.DW(8), .DEPTH(64)) dut (
    .clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata, .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ea, eb;
    logic rda, rdb;
    for (int i = 0; i < 64; i++) model[i] = '0;
    // fill with pixel numbers: word k holds values 2k and 2k+1
    for (int k = 0; k < 64; k += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 2'b11; a_addr = 6'(k);     a_wdata = {8'(2*k+1), 8'(2*k)};
      b_en = 1; b_we = 2'b11; b_addr = 6'(k + 1); b_wdata = {8'(2*k+3), 8'(2*k+2)};
      model[k] = a_wdata; model[k+1] = b_wdata;
    end
    // read two adjacent words: four neighbouring values in one cycle
    @(negedge clk);
    a_we = 0; b_we = 0; a_addr = 6'd10; b_addr = 6'd11;
    @(negedge clk);
    checks++;
    if ({b_rdata, a_rdata} != {8'd23, 8'd22, 8'd21, 8'd20}) begin
      failures++; $display("FAIL four-value read %h %h", b_rdata, a_rdata);
    end
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a_en = 1'($urandom); b_en = 1'($urandom);
      a_we = 2'($urandom); b_we = 2'($urandom);
      a_addr = 6'($urandom); b_addr = 6'($urandom);
      if (a_addr == b_addr) b_we = 0;
      a_wdata = 16'($urandom); b_wdata = 16'($urandom);
      rda = a_en; rdb = b_en;
      ea = model[a_addr]; eb = model[b_addr];
      if (a_en && a_we[0]) model[a_addr][7:0]  = a_wdata[7:0];
      if (a_en && a_we[1]) model[a_addr][15:8] = a_wdata[15:8];
      if (b_en && b_we[0]) model[b_addr][7:0]  = b_wdata[7:0];
      if (b_en && b_we[1]) model[b_addr][15:8] = b_wdata[15:8];
      @(posedge clk); #1;
      if (rda) begin checks++; if (a_rdata != ea) begin failures++; $display("FAIL port A %h exp %h", a_rdata, ea); end end
      if (rdb) begin checks++; if (b_rdata != eb) begin failures++; $display("FAIL port B %h exp %h", b_rdata, eb); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
