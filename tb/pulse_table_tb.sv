// pulse_table_tb: self-checking test of the 2048-entry pulse table.
//
// Fills every entry with a pseudo-random word, then reads all entries back
// and compares each with a copy kept in the testbench, checking the one-clock
// read latency. A second pass overwrites a few entries while reading others.
module pulse_table_tb;
  localparam int DEPTH = 2048;
  logic        clk = 0;
  logic        we = 0;
  logic [10:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  pulse_table dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [10:0] a);
    raddr <= a;
    @(posedge clk);      // read registered here
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("mismatch at %0d: got %h expected %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    @(posedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = 16'($urandom);
      we <= 1; waddr <= 11'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 0;
    for (int a = 0; a < DEPTH; a++) check_read(11'(a));
    // simultaneous write and read of different entries
    for (int n = 0; n < 64; n++) begin
      logic [10:0] wa, ra;
      wa = 11'($urandom); ra = wa + 11'd7;
      model[wa] = 16'($urandom);
      we <= 1; waddr <= wa; wdata <= model[wa];
      check_read(ra);
      we <= 0;
      check_read(wa);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
