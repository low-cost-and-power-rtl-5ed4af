// tb_sp_sram: self-checking test of sp_sram at its default size (64 x 21).
// Fills the array, then runs random masked writes and reads against a shadow copy,
// checking read data one clock after the read and that rdata holds on idle and
// write cycles.
module tb_sp_sram;
  localparam int DEPTH = 64, WIDTH = 21;
  logic clk = 0;
  logic en, we;
  logic [5:0] addr;
  logic [WIDTH-1:0] wmask, wdata, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  sp_sram dut (.clk, .en, .we, .addr, .wmask, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [WIDTH-1:0] exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: rdata=%h expected %h", what, rdata, exp);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] last;
    en = 0; we = 0; addr = 0; wmask = '1; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      en = 1; we = 1; addr = 6'(i); wmask = '1; wdata = WIDTH'($urandom);
      shadow[i] = wdata;
      @(negedge clk);
    end
    // read every entry back
    for (int i = 0; i < DEPTH; i++) begin
      en = 1; we = 0; addr = 6'(i);
      @(negedge clk);
      check(shadow[i], "full read");
    end
    last = rdata;
    for (int n = 0; n < 3000; n++) begin
      int op;
      op = $urandom_range(0, 2);
      addr = 6'($urandom);
      case (op)
        0: begin  // masked write, rdata must hold
          en = 1; we = 1; wmask = WIDTH'($urandom); wdata = WIDTH'($urandom);
          shadow[addr] = (shadow[addr] & ~wmask) | (wdata & wmask);
          @(negedge clk);
          check(last, "hold on write");
        end
        1: begin
          en = 1; we = 0;
          @(negedge clk);
          check(shadow[addr], "read");
          last = rdata;
        end
        default: begin  // idle, with we high to show en gates writes
          en = 0; we = 1; wdata = ~shadow[addr]; wmask = '1;
          @(negedge clk);
          check(last, "hold on idle");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
