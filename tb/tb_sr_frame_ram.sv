// tb_sr_frame_ram: self-checking test of the multi-port frame memory.
// Fills a small memory, then reads random addresses on all read ports while
// random writes continue, and checks each read against a shadow copy held in
// the testbench: data must appear one cycle after the address, and a write is
// seen by reads addressed in later cycles.
module tb_sr_frame_ram;
  localparam int WORDS = 300;
  localparam int NRD   = 3;
  localparam int AW    = $clog2(WORDS);

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [31:0]   wdata = '0;
  logic [AW-1:0] raddr [NRD];
  logic [31:0]   rdata [NRD];
  logic [31:0]   shadow [WORDS];
  logic [31:0]   expv [NRD];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sr_frame_ram #(.WORDS(WORDS), .NRD(NRD)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NRD; p++) raddr[p] = '0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      // present addresses and an optional write, then check one cycle later
      for (int p = 0; p < NRD; p++) begin
        raddr[p] = AW'($urandom_range(WORDS - 1, 0));
        expv[p]  = shadow[raddr[p]];
      end
      we = ($urandom_range(1, 0) == 1);
      waddr = AW'($urandom_range(WORDS - 1, 0));
      wdata = $urandom;
      @(negedge clk);
      if (we) shadow[waddr] = wdata;
      we = 1'b0;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== expv[p]) begin
          failures++;
          if (failures < 10) $display("port %0d: got %h expected %h", p, rdata[p], expv[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
