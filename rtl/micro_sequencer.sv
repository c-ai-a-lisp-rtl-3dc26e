// micro_sequencer: micro-program controller K(4).
//
// Holds the microprogram counter UPC, the 16-bit displacement of the current
// microword within the language's microcode (the cache adds the microbase).
// Each clock in which the engine runs and nothing stalls, the current
// microword retires and UPC moves on: to the value written into UPC by a
// transfer (how microcode returns, by moving a saved UPC word off the stack),
// else to the jump address if the microword's jump is taken, else to UPC+1.
// Jumps follow the microword formats: type 2 jumps when its enable bit is
// set; type 4 tests conditions (sense 0: jump if any selected condition is
// 1; sense 1: jump if none is), type 6 jumps on byte equal (JC=1) or not
// equal (JC=0). The test semantics, start/halt handshake and the error stop
// on a word that is not a microcommand are this design's choices. start
// (while stopped) begins execution at start_disp on the next clock.
module micro_sequencer
  import plisp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [UDW-1:0]   start_disp,
  input  logic             word_ok,    // the microword is present (cache hit)
  input  logic             word_valid, // and it is a legal microcommand
  input  logic             stall,      // ALU or memory wait
  input  logic             halt_req,
  input  jkind_e           jkind,
  input  logic [UDW-1:0]   jaddr,
  input  logic             tsense,
  input  logic [NCOND-1:0] tmask,
  input  logic [NCOND-1:0] cond,
  input  logic             cmp_eq,
  input  logic             cmp_jeq,
  input  logic             upc_load,
  input  logic [UDW-1:0]   upc_load_val,
  output logic [UDW-1:0]   upc,
  output logic             running,
  output logic             retire,
  output logic             taken,
  output logic             uerr
);
  logic any_sel;

  assign any_sel = |(cond & tmask);
  always_comb begin
    unique case (jkind)
      JK_ALWAYS: taken = 1'b1;
      JK_TEST:   taken = tsense ? !any_sel : any_sel;
      JK_CMP:    taken = (cmp_eq == cmp_jeq);
      default:   taken = 1'b0;
    endcase
  end

  assign retire = running && word_ok && word_valid && !stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upc     <= '0;
      running <= 1'b0;
      uerr    <= 1'b0;
    end else if (!running) begin
      if (start) begin
        upc     <= start_disp;
        running <= 1'b1;
        uerr    <= 1'b0;
      end
    end else if (word_ok && !word_valid) begin
      running <= 1'b0;
      uerr    <= 1'b1;
    end else if (retire) begin
      if (upc_load)   upc <= upc_load_val;
      else if (taken) upc <= jaddr;
      else            upc <= upc + UDW'(1);
      if (halt_req)   running <= 1'b0;
    end
  end
endmodule
