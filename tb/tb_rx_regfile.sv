// tb_rx_regfile: writes random samples into random entries of a 5-entry Rx
// register file, with writes disabled on some cycles, and after every cycle
// reads back each entry and compares it with a shadow copy.
module tb_rx_regfile;
  import dtw_pkg::*;

  localparam int S = 5;
  logic       clk = 1'b0;
  logic       we;
  logic [2:0] waddr, raddr;
  fp32_t      wdata, rdata;
  logic [31:0] shadow [S];
  bit          written [S];
  int         checks = 0, failures = 0;

  rx_regfile #(.SLOTS(S)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      we    = (n < S) || ($urandom % 3 != 0);
      waddr = (n < S) ? 3'(n) : 3'($urandom % S);
      wdata = $urandom;
      @(posedge clk);
      if (we) begin
        shadow[waddr]  = wdata;
        written[waddr] = 1'b1;
      end
      #1;
      we = 1'b0;
      for (int k = 0; k < S; k++) begin
        raddr = 3'(k);
        #1;
        if (written[k]) begin
          checks++;
          if (rdata !== shadow[k]) begin
            failures++;
            $display("FAIL entry %0d: got %h expected %h", k, rdata, shadow[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
