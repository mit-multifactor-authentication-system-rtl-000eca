// Joke database: the reward shown to an authorized user. Eight jokes of three
// 28-character ASCII lines (224 bits each, first character in the most
// significant byte, space padded) sit in a case ROM. A 3-bit counter advances
// every clock cycle, so the moment the read enable arrives picks an effectively
// random joke; the chosen lines are registered on that cycle (one-cycle latency)
// and hold until the next read. The first joke is the one shown in the source's
// photograph of the authorized screen; the other seven are this design's.
module joke_database #(
  parameter int unsigned JOKES = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         read_en,
  output logic [223:0] line0,
  output logic [223:0] line1,
  output logic [223:0] line2
);
  logic [$clog2(JOKES)-1:0] counter;

  always_ff @(posedge clk) begin
    if (reset) counter <= '0;
    else if (counter == $bits(counter)'(JOKES - 1)) counter <= '0;
    else counter <= counter + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      line0 <= {28{8'h20}};
      line1 <= {28{8'h20}};
      line2 <= {28{8'h20}};
    end else if (read_en) begin
      unique case (3'(counter))
      3'd0: begin
        line0 <= "Q: Anyone know any jokes    ";
        line1 <= "about sodium?               ";
        line2 <= "A: Na                       ";
      end
      3'd1: begin
        line0 <= "Q: Why did the flip-flop    ";
        line1 <= "miss the party?             ";
        line2 <= "A: It had no clock.         ";
      end
      3'd2: begin
        line0 <= "Q: What do you call a       ";
        line1 <= "sleeping bull?              ";
        line2 <= "A: A bulldozer.             ";
      end
      3'd3: begin
        line0 <= "Q: Why are ghosts bad       ";
        line1 <= "at lying?                   ";
        line2 <= "A: You see through them.    ";
      end
      3'd4: begin
        line0 <= "Q: What did the resistor    ";
        line1 <= "say to the current?         ";
        line2 <= "A: You shall not pass!      ";
      end
      3'd5: begin
        line0 <= "Q: How do you organize      ";
        line1 <= "a space party?              ";
        line2 <= "A: You planet.              ";
      end
      3'd6: begin
        line0 <= "Q: Why was the FPGA calm?   ";
        line1 <= "                            ";
        line2 <= "A: It had no bad routes.    ";
      end
      3'd7: begin
        line0 <= "Q: What is a bit's          ";
        line1 <= "favourite snack?            ";
        line2 <= "A: A byte.                  ";
      end
      endcase
    end
  end
endmodule
