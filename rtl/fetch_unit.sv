// fetch_unit: pre-fetch (PFE) and fetch (FE) stages and the instruction
// register of the decode stage.
//
// PFE presents the program counter to the program memory; the word arrives
// one cycle later in FE and moves into the DC instruction register. While
// DC stalls (`hold`), the counter and the memory read are frozen so that
// FE keeps its word. A taken jump or loop branch decoded in DC (`redirect`)
// loads the counter and discards the two younger words in FE and DC: a
// taken branch costs two cycles. HALT in DC stops fetching. `start` begins
// execution at address 0. Stage names follow the document; branch handling
// is this design's own choice.
module fetch_unit
  import napcore_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             hold,
  input  logic             redirect,
  input  logic [PM_AW-1:0] target,
  input  logic             halt,
  output logic             pm_re,
  output logic [PM_AW-1:0] pm_addr,
  input  logic [31:0]      pm_rdata,
  output logic             dc_valid,
  output logic [31:0]      dc_instr,
  output logic             running
);
  logic [PM_AW-1:0] pc;
  logic             fe_valid;

  assign pm_re   = running && !hold;
  assign pm_addr = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      running  <= 1'b0;
      fe_valid <= 1'b0;
      dc_valid <= 1'b0;
      dc_instr <= '0;
    end else if (start) begin
      pc       <= '0;
      running  <= 1'b1;
      fe_valid <= 1'b0;
      dc_valid <= 1'b0;
    end else if (halt) begin
      running  <= 1'b0;
      fe_valid <= 1'b0;
      dc_valid <= 1'b0;
    end else if (redirect) begin
      pc       <= target;
      fe_valid <= 1'b0;
      dc_valid <= 1'b0;
    end else if (!hold) begin
      if (running) pc <= pc + 1'b1;
      fe_valid <= running;
      dc_valid <= fe_valid;
      dc_instr <= pm_rdata;
    end
  end
endmodule
