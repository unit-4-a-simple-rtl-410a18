// ram_tb: self-checking test of the 256 x 12 memory.
// Writes every word, then mixes random writes and reads against a model
// array kept here; checks that a read is combinational (same cycle) and
// that rdata is zero while read is low.
module ram_tb;
  logic        clk = 0, read, write;
  logic [7:0]  addr;
  logic [11:0] wdata, rdata;
  logic [11:0] model [256];
  int          checks = 0, failures = 0;

  ram dut (.clk(clk), .addr(addr), .read(read), .write(write), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    read = 0; write = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      addr = 8'(i); wdata = 12'($urandom); write = 1;
      model[i] = wdata;
    end
    @(negedge clk); write = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr = 8'($urandom);
      if ($urandom_range(0, 2) == 0) begin
        write = 1; read = 0; wdata = 12'($urandom);
        model[addr] = wdata;
      end else begin
        write = 0; read = ($urandom_range(0, 3) != 0);
        #1;
        checks++;
        if (rdata !== (read ? model[addr] : 12'h000)) begin
          failures++;
          $display("RAM mismatch addr=%h read=%b got=%h exp=%h", addr, read, rdata, model[addr]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
